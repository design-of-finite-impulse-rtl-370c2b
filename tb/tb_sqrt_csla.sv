// tb_sqrt_csla: checks the 32-bit square-root carry-select adder and a 9-bit
// instance against a + b + cin, with random operands and carry chains that
// run through every group boundary.
module tb_sqrt_csla;
  localparam int N = 32;
  localparam int M = 9;
  logic [N-1:0] a, b, s;
  logic         cin, co;
  logic [M-1:0] x, y, t;
  logic         xc, tc;
  int checks = 0, failures = 0;

  sqrt_csla #(.N(N)) dut  (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  sqrt_csla #(.N(M)) dut9 (.a(x), .b(y), .cin(xc), .sum(t), .cout(tc));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32();
    logic [N:0] ref_sum;
    #1;
    ref_sum = (N+1)'(a) + (N+1)'(b) + (N+1)'(cin);
    checks++;
    if ({co, s} != ref_sum) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %h", a, b, cin, co, s, ref_sum);
    end
  endtask

  initial begin
    x = '0; y = '0; xc = 1'b0;
    // all ones plus one: the carry ripples through every group
    a = '1; b = '0; cin = 1'b1; check32();
    a = '1; b = '1; cin = 1'b1; check32();
    a = '0; b = '0; cin = 1'b0; check32();
    // a carry generated just below each bit position, propagated above it
    for (int k = 0; k < N; k++) begin
      a = ~(N'(1) << k) | (N'(1) << k);
      b = N'(1) << k;
      cin = 1'b0;
      check32();
      a = ~N'(0) << k;
      b = N'(1) << k;
      cin = k[0];
      check32();
    end
    for (int n = 0; n < 5000; n++) begin
      a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
      check32();
    end
    for (int v = 0; v < (1 << (2 * M + 1)); v += 7) begin
      {xc, x, y} = (2*M+1)'(v);
      #1;
      checks++;
      if ({tc, t} != (M+1)'(int'(x) + int'(y) + int'(xc))) begin
        failures++;
        if (failures < 10) $display("FAIL 9-bit %h + %h + %b = %b_%h", x, y, xc, tc, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
