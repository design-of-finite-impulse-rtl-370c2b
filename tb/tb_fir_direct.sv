// tb_fir_direct: runs the 8-tap, 16-bit direct-form FIR filter against a
// reference convolution computed in the testbench from the sample history.
// Covers reset, the impulse response (which must read back h[0..7]), maximum
// operands, random samples with gaps in in_valid, and the one-cycle latency
// from a valid sample to out_valid.
module tb_fir_direct;
  localparam int W    = 16;
  localparam int TAPS = 8;
  localparam int OW   = 2 * W + $clog2(TAPS);
  logic                   clk = 1'b0;
  logic                   reset, in_valid, out_valid;
  logic [W-1:0]           a_in;
  logic [TAPS-1:0][W-1:0] h;
  logic [OW-1:0]          z_out;
  logic [W-1:0]           hist [TAPS];   // hist[k] = a[n-k] of the model
  int checks = 0, failures = 0, gaps = 0;

  fir_direct #(.W(W), .TAPS(TAPS)) dut (
    .clk(clk), .reset(reset), .in_valid(in_valid), .a_in(a_in), .h(h),
    .out_valid(out_valid), .z_out(z_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OW-1:0] model(logic [W-1:0] x);
    logic [63:0] acc;
    acc = 64'(x) * 64'(h[0]);
    for (int k = 1; k < TAPS; k++) acc += 64'(hist[k-1]) * 64'(h[k]);
    return OW'(acc);
  endfunction

  // One cycle: present a sample (or none), take the edge, check the output.
  task automatic step(logic v, logic [W-1:0] x);
    logic [OW-1:0] want;
    in_valid = v; a_in = x;
    want = model(x);
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("FAIL out_valid=%b after in_valid=%b", out_valid, v);
    end
    if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      checks++;
      if (z_out !== want) begin
        failures++;
        $display("FAIL z=%0d expected %0d", z_out, want);
      end
    end else begin
      gaps++;
    end
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) begin
      hist[k] = '0;
      h[k] = W'(k * 1000 + 17);
    end
    reset = 1'b1; in_valid = 1'b0; a_in = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || z_out !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    reset = 1'b0;
    // impulse response: output k of a unit impulse equals h[k]
    step(1'b1, 16'd1);
    checks++;
    if (z_out !== OW'(h[0])) begin failures++; $display("FAIL impulse h[0]"); end
    for (int k = 1; k < TAPS; k++) begin
      step(1'b1, 16'd0);
      checks++;
      if (z_out !== OW'(h[k])) begin failures++; $display("FAIL impulse h[%0d]=%0d", k, z_out); end
    end
    // all-ones samples and coefficients: the largest possible output
    for (int k = 0; k < TAPS; k++) h[k] = '1;
    for (int n = 0; n < TAPS + 2; n++) step(1'b1, '1);
    checks++;
    if (z_out !== OW'(TAPS) * OW'(32'hfffe0001)) begin failures++; $display("FAIL max output"); end
    // random coefficients and samples, random gaps
    for (int k = 0; k < TAPS; k++) h[k] = W'($urandom);
    for (int n = 0; n < 2000; n++) step(1'($urandom_range(0, 3) != 0), W'($urandom));
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no gaps in in_valid"); end
    // reset in the middle clears the delay line
    reset = 1'b1;
    @(posedge clk);
    #1;
    reset = 1'b0;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    for (int n = 0; n < 50; n++) step(1'b1, W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
