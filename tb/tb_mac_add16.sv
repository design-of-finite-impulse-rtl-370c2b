// tb_mac_add16: clocks the 16-bit MAC unit against a cycle model kept in the
// testbench. Checks prod = A * B combinationally, that mult and accum stay 0
// while reset is high, that a product reaches mult one edge after its operands
// and accum one edge later, and that accum wraps modulo 2^32.
module tb_mac_add16;
  localparam int W = 16;
  logic           clk = 1'b0;
  logic           reset;
  logic [W-1:0]   A, B;
  logic [2*W-1:0] prod, mult, accum, RES;
  logic [2*W-1:0] m_ref, a_ref;
  int checks = 0, failures = 0, wraps = 0;

  mac_add16 #(.W(W)) dut (
    .clk(clk), .reset(reset), .A(A), .B(B),
    .prod(prod), .mult(mult), .accum(accum), .RES(RES)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [2*W-1:0] got, logic [2*W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s = %h, expected %h (A=%h B=%h)", what, got, want, A, B);
    end
  endtask

  // One clock cycle: set operands, check the combinational product, take the
  // edge, update the model and check the registers.
  task automatic step(logic [W-1:0] x, logic [W-1:0] y, logic rst);
    logic [2*W-1:0] a_next;
    A = x; B = y; reset = rst;
    #1;
    expect_eq("prod", prod, 32'(x) * 32'(y));
    @(posedge clk);
    if (rst) begin
      a_next = '0;
      m_ref  = '0;
    end else begin
      a_next = a_ref + m_ref;
      if (33'(a_ref) + 33'(m_ref) > 33'h0ffffffff) wraps++;
      m_ref = 32'(x) * 32'(y);
    end
    a_ref = a_next;
    #1;
    expect_eq("mult", mult, m_ref);
    expect_eq("accum", accum, a_ref);
    expect_eq("RES", RES, a_ref);
  endtask

  initial begin
    m_ref = '0; a_ref = '0;
    // operands of the MAC simulation example, applied while reset is high
    step(16'b0000000000011010, 16'b0001110001110101, 1'b1);
    step(16'b1100000000011010, 16'b0011010001110101, 1'b1);
    step(16'b1100000000011110, 16'd405, 1'b1);
    // accumulate the same operands with reset low
    step(16'b0000000000011010, 16'b0001110001110101, 1'b0);
    step(16'b1100000000011010, 16'b0011010001110101, 1'b0);
    step(16'b1100000000011110, 16'd405, 1'b0);
    step('0, '0, 1'b0);
    // explicit latency: one product, then zeros
    step('0, '0, 1'b1);
    step(16'd3, 16'd7, 1'b0);
    expect_eq("mult after one edge", mult, 32'd21);
    expect_eq("accum after one edge", accum, 32'd0);
    step('0, '0, 1'b0);
    expect_eq("accum after two edges", accum, 32'd21);
    // large products until the accumulator wraps
    for (int n = 0; n < 8; n++) step('1, '1, 1'b0);
    for (int n = 0; n < 500; n++) step(W'($urandom), W'($urandom), 1'($urandom_range(0, 49) == 0));
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL accumulator never wrapped");
    end
    $display("accumulator wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
