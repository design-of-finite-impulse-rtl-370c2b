// tb_fir_wallace_top: end-to-end test of the top level at its default sizes
// (16-bit data, 8 taps). The FIR filter is run through reset, an impulse
// response, a stream of random samples with gaps and a full-scale stream, and
// compared with a convolution computed here. At the same time the MAC unit is
// fed random operand pairs and compared with a cycle model. Each mechanism is
// counted and a failure is counted for any that never happened: reset,
// sample gaps (the delay line holding), impulse response taps, a full-scale
// FIR output, MAC accumulation and MAC accumulator wrap-around.
module tb_fir_wallace_top;
  localparam int W    = 16;
  localparam int TAPS = 8;
  localparam int OW   = 2 * W + $clog2(TAPS);

  logic                   clk = 1'b0;
  logic                   reset;
  logic                   fir_in_valid, fir_out_valid;
  logic [W-1:0]           fir_a;
  logic [TAPS-1:0][W-1:0] fir_h;
  logic [OW-1:0]          fir_z;
  logic [W-1:0]           mac_A, mac_B;
  logic [2*W-1:0]         mac_prod, mac_mult, mac_accum, mac_RES;

  logic [W-1:0]   hist [TAPS];
  logic [2*W-1:0] m_ref, a_ref;
  int checks = 0, failures = 0;
  int n_reset = 0, n_gap = 0, n_impulse = 0, n_fullscale = 0, n_accum = 0, n_wrap = 0;

  fir_wallace_top dut (
    .clk(clk), .reset(reset),
    .fir_in_valid(fir_in_valid), .fir_a(fir_a), .fir_h(fir_h),
    .fir_out_valid(fir_out_valid), .fir_z(fir_z),
    .mac_A(mac_A), .mac_B(mac_B),
    .mac_prod(mac_prod), .mac_mult(mac_mult), .mac_accum(mac_accum), .mac_RES(mac_RES)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  function automatic logic [OW-1:0] fir_model(logic [W-1:0] x);
    logic [63:0] acc;
    acc = 64'(x) * 64'(fir_h[0]);
    for (int k = 1; k < TAPS; k++) acc += 64'(hist[k-1]) * 64'(fir_h[k]);
    return OW'(acc);
  endfunction

  // One clock cycle of both units.
  task automatic cycle(logic rst, logic v, logic [W-1:0] x, logic [W-1:0] ma, logic [W-1:0] mb);
    logic [OW-1:0]  want;
    logic [2*W-1:0] a_next;
    reset = rst; fir_in_valid = v; fir_a = x; mac_A = ma; mac_B = mb;
    #1;
    expect_eq("mac_prod", 64'(mac_prod), 64'(ma) * 64'(mb));
    want = fir_model(x);
    @(posedge clk);
    #1;
    if (rst) begin
      n_reset++;
      for (int k = 0; k < TAPS; k++) hist[k] = '0;
      m_ref = '0;
      a_next = '0;
      expect_eq("fir_out_valid in reset", 64'(fir_out_valid), 0);
      expect_eq("fir_z in reset", 64'(fir_z), 0);
    end else begin
      expect_eq("fir_out_valid", 64'(fir_out_valid), 64'(v));
      if (v) begin
        expect_eq("fir_z", 64'(fir_z), 64'(want));
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
      end else begin
        n_gap++;
      end
      a_next = a_ref + m_ref;
      if (m_ref != 0) n_accum++;
      if (33'(a_ref) + 33'(m_ref) > 33'h0ffffffff) n_wrap++;
      m_ref = 32'(ma) * 32'(mb);
    end
    a_ref = a_next;
    expect_eq("mac_mult", 64'(mac_mult), 64'(m_ref));
    expect_eq("mac_accum", 64'(mac_accum), 64'(a_ref));
    expect_eq("mac_RES", 64'(mac_RES), 64'(a_ref));
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) begin
      hist[k] = '0;
      fir_h[k] = W'($urandom);
    end
    m_ref = '0; a_ref = '0;
    cycle(1'b1, 1'b0, '0, '0, '0);
    cycle(1'b1, 1'b1, 16'd5, 16'd9, 16'd9);
    // impulse response of the filter, one tap per output
    cycle(1'b0, 1'b1, 16'd1, 16'd0, 16'd0);
    expect_eq("impulse tap 0", 64'(fir_z), 64'(fir_h[0]));
    n_impulse++;
    for (int k = 1; k < TAPS; k++) begin
      cycle(1'b0, 1'b1, 16'd0, W'(k), W'(k + 1));
      expect_eq("impulse tap", 64'(fir_z), 64'(fir_h[k]));
      n_impulse++;
    end
    // random stream with gaps, MAC on random operands
    for (int n = 0; n < 3000; n++)
      cycle(1'b0, 1'($urandom_range(0, 3) != 0), W'($urandom), W'($urandom), W'($urandom));
    // full-scale stream on both units
    for (int k = 0; k < TAPS; k++) fir_h[k] = '1;
    for (int n = 0; n < TAPS + 4; n++) cycle(1'b0, 1'b1, '1, '1, '1);
    expect_eq("full-scale fir_z", 64'(fir_z), 64'(TAPS) * 64'(32'hfffe0001));
    n_fullscale++;
    // reset in the middle of a stream
    cycle(1'b1, 1'b1, W'($urandom), W'($urandom), W'($urandom));
    for (int n = 0; n < 100; n++)
      cycle(1'b0, 1'b1, W'($urandom), W'($urandom), W'($urandom));

    $display("mechanisms: reset=%0d gap=%0d impulse_taps=%0d fullscale=%0d mac_accumulate=%0d mac_wrap=%0d",
             n_reset, n_gap, n_impulse, n_fullscale, n_accum, n_wrap);
    if (n_reset == 0)     begin failures++; $display("FAIL reset never happened"); end
    if (n_gap == 0)       begin failures++; $display("FAIL no sample gap"); end
    if (n_impulse == 0)   begin failures++; $display("FAIL no impulse response"); end
    if (n_fullscale == 0) begin failures++; $display("FAIL no full-scale output"); end
    if (n_accum == 0)     begin failures++; $display("FAIL MAC never accumulated"); end
    if (n_wrap == 0)      begin failures++; $display("FAIL MAC accumulator never wrapped"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
