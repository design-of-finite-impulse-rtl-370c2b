// fir_wallace_top: top level of the Wallace-multiplier FIR design.
// It holds two units side by side that share clk and reset: the direct-form
// FIR filter (fir_direct, TAPS taps of W-bit unsigned samples and coefficients,
// one Wallace multiplier per tap, output one cycle after each valid sample) and
// the W-bit multiply-accumulate unit (mac_add16, combinational product, one
// product register, accumulator). All ports are plain signals; see the two
// units for their timing. Placing both units in one top is this design's choice.
module fir_wallace_top #(
  parameter int unsigned W    = 16,
  parameter int unsigned TAPS = 8,
  parameter int unsigned OW   = 2 * W + $clog2(TAPS)
) (
  input  logic                   clk,
  input  logic                   reset,
  // FIR filter
  input  logic                   fir_in_valid,
  input  logic [W-1:0]           fir_a,
  input  logic [TAPS-1:0][W-1:0] fir_h,
  output logic                   fir_out_valid,
  output logic [OW-1:0]          fir_z,
  // MAC unit
  input  logic [W-1:0]           mac_A,
  input  logic [W-1:0]           mac_B,
  output logic [2*W-1:0]         mac_prod,
  output logic [2*W-1:0]         mac_mult,
  output logic [2*W-1:0]         mac_accum,
  output logic [2*W-1:0]         mac_RES
);
  fir_direct #(.W(W), .TAPS(TAPS), .OW(OW)) u_fir (
    .clk      (clk),
    .reset    (reset),
    .in_valid (fir_in_valid),
    .a_in     (fir_a),
    .h        (fir_h),
    .out_valid(fir_out_valid),
    .z_out    (fir_z)
  );

  mac_add16 #(.W(W)) u_mac (
    .clk  (clk),
    .reset(reset),
    .A    (mac_A),
    .B    (mac_B),
    .prod (mac_prod),
    .mult (mac_mult),
    .accum(mac_accum),
    .RES  (mac_RES)
  );
endmodule
