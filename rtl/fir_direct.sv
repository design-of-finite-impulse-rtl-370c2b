// fir_direct: direct-form FIR filter, z[n] = sum_{k=0}^{TAPS-1} h[k] * a[n-k].
// A shift register of TAPS-1 delay stages holds a[n-1] .. a[n-N]; the current
// sample a_in is a[n]. Each tap has its own Wallace-tree multiplier
// (wallace_mult) and the products are summed by an adder chain. With in_valid
// high, the clock edge stores z[n] in z_out (out_valid goes high for one cycle)
// and shifts a_in into the delay line, so z[n] appears one cycle after a[n].
// With in_valid low nothing moves. reset (synchronous, active high) clears the
// delay line, z_out and out_valid. Data and coefficients are unsigned; z_out
// has full precision, OW = 2W + clog2(TAPS) bits. The coefficients h are
// inputs meant to be held constant.
// The delay line, one multiplier per tap and the adder chain follow the
// source's direct-form structure; the tap count, the unsigned full-precision
// arithmetic, the strobes and the output register are this design's choices.
module fir_direct #(
  parameter int unsigned W    = 16,
  parameter int unsigned TAPS = 8,
  parameter int unsigned OW   = 2 * W + $clog2(TAPS)
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  in_valid,
  input  logic [W-1:0]          a_in,
  input  logic [TAPS-1:0][W-1:0] h,
  output logic                  out_valid,
  output logic [OW-1:0]         z_out
);
  logic [TAPS-1:0][W-1:0]   tap;    // tap[k] = a[n-k]
  logic [TAPS-1:0][2*W-1:0] prod;
  logic [TAPS-1:0][OW-1:0]  acc;    // acc[k] = sum of products 0..k
  logic [TAPS-1:1][W-1:0]   dly;    // delay registers, dly[k] = a[n-k]

  if (TAPS < 2) begin : g_bad_taps
    $error("fir_direct needs TAPS >= 2");
  end

  assign tap[0] = a_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_tap
    assign tap[k] = dly[k];
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    wallace_mult #(.W(W)) u_mult (.a(tap[k]), .b(h[k]), .p(prod[k]));
    if (k == 0) begin : g_first
      assign acc[k] = OW'(prod[k]);
    end else begin : g_add
      assign acc[k] = acc[k-1] + OW'(prod[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      dly       <= '0;
      z_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z_out <= acc[TAPS-1];
        for (int k = TAPS - 1; k > 1; k--) dly[k] <= dly[k-1];
        dly[1] <= a_in;
      end
    end
  end
endmodule
