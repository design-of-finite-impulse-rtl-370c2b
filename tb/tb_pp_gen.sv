// tb_pp_gen: checks every partial-product bit of a 16 x 16 pp_gen against
// a[j] & b[i], for corner operands and random ones, and checks that the
// weighted sum of all partial products equals a * b.
module tb_pp_gen;
  localparam int W = 16;
  logic [W-1:0]        a, b;
  logic [W-1:0][W-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen #(.W(W)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned total;
    #1;
    total = 0;
    for (int i = 0; i < W; i++) begin
      for (int j = 0; j < W; j++) begin
        checks++;
        if (pp[i][j] !== (a[j] & b[i])) begin
          failures++;
          $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", a, b, i, j, pp[i][j]);
        end
        if (pp[i][j]) total += 64'(1) << (i + j);
      end
    end
    checks++;
    if (total != 64'(a) * 64'(b)) begin
      failures++;
      $display("FAIL a=%h b=%h weighted sum %0d", a, b, total);
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 16'h8001; b = 16'h00ff; check();
    for (int n = 0; n < 200; n++) begin
      a = W'($urandom);
      b = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
