// sinc_rom: table of sinc(d / 256) = sin(pi d/256) / (pi d/256) for
// d = 0 .. DEPTH-1, i.e. the interpolation kernel sampled every 1/256 of a
// sample period, as signed fixed-point numbers with FRAC fraction bits
// (sinc(0) = 1.0 is stored as 2^FRAC - 1 so that it fits in VW bits).
//
// The contents are computed when the memory is initialised; the array is
// read asynchronously (a distributed ROM). Only non-negative distances are
// stored: the kernel is even, so the caller looks up |d|.
//
// Interface: addr -> data (VW bits, signed). Combinational read.
//
// Source and choices: a sinc table at 1/256-sample resolution, 24 bits wide,
// follows the original design. Computing it at elaboration instead of loading
// a file, its 1025 entries (0 to 4 samples), and the 22 fraction bits are this
// design's choices.
module sinc_rom #(
  parameter int DEPTH = 1025,   // covers |d| <= 4 samples at 1/256 spacing
  parameter int VW    = 24,
  parameter int FRAC  = 22
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic signed [VW-1:0]     data
);
  logic signed [VW-1:0] rom [DEPTH];

  function automatic logic signed [VW-1:0] sinc_q(input int d);
    real arg, v;
    if (d == 0) return VW'((64'sd1 <<< FRAC) - 1);
    arg = 3.14159265358979323846 * real'(d) / 256.0;
    v   = $sin(arg) / arg;
    return VW'($rtoi(v * real'(64'sd1 <<< FRAC) + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  initial begin
    for (int d = 0; d < DEPTH; d++) rom[d] = sinc_q(d);
  end

  assign data = (int'(addr) < DEPTH) ? rom[addr] : '0;
endmodule
