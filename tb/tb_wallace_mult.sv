// tb_wallace_mult: checks the 16 x 16 Wallace multiplier against a * b for the
// input combinations of the MAC simulation example, corner cases and random
// operands, and an 8 x 8 instance exhaustively.
module tb_wallace_mult;
  localparam int W = 16;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  logic [7:0]     c, d;
  logic [15:0]    q;
  int checks = 0, failures = 0;

  wallace_mult #(.W(W)) dut  (.a(a), .b(b), .p(p));
  wallace_mult #(.W(8)) dut8 (.a(c), .b(d), .p(q));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] x, logic [W-1:0] y, logic [2*W-1:0] expected);
    a = x; b = y;
    #1;
    checks++;
    if (p !== expected) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, expected);
    end
  endtask

  initial begin
    c = '0; d = '0;
    // 49178 * 13429 = 660411362, a product given bit for bit in the example
    check(16'b1100000000011010, 16'b0011010001110101, 32'b00100111010111010001001111100010);
    check(16'b0000000000011010, 16'b0001110001110101, 32'd189410);
    check(16'b1100000000011110, 16'd405, 32'd19918710);
    check('0, '0, '0);
    check('1, '1, 32'hfffe0001);
    check('1, 16'd1, 32'h0000ffff);
    check(16'h8000, 16'h8000, 32'h40000000);
    for (int n = 0; n < 5000; n++) begin
      logic [W-1:0] x, y;
      x = W'($urandom); y = W'($urandom);
      check(x, y, 32'(x) * 32'(y));
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        c = 8'(x); d = 8'(y);
        #1;
        checks++;
        if (q != 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d = %0d", x, y, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
