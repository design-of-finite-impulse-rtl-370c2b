// tb_rcw_tree: drives rcw_tree (16 x 16 and exhaustively 8 x 8) with the
// partial products of operand pairs, formed here in the testbench, and checks
// that the two output rows add up to a * b. It also checks the planned stage
// structure: an 8-row matrix must shrink 8-6-4-3-2 in four stages and a
// 16-row one in six.
module tb_rcw_tree
  import wallace_pkg::*;
;
  localparam int W = 16;
  localparam int V = 8;
  logic [W-1:0]        a, b;
  logic [V-1:0]        c, d;
  logic [W-1:0][W-1:0] pp;
  logic [V-1:0][V-1:0] qq;
  logic [2*W-1:0]      r0, r1;
  logic [2*V-1:0]      q0, q1;
  int checks = 0, failures = 0;

  always_comb
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++) pp[i][j] = a[j] & b[i];
  always_comb
    for (int i = 0; i < V; i++)
      for (int j = 0; j < V; j++) qq[i][j] = c[j] & d[i];

  rcw_tree #(.W(W)) dut16 (.pp(pp), .row0(r0), .row1(r1));
  rcw_tree #(.W(V)) dut8  (.pp(qq), .row0(q0), .row1(q1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int max_height(int w, int st);
    int mx;
    mx = 0;
    for (int k = 0; k < 2 * w; k++)
      if (plan(w, st, k, Q_HEIGHT) > mx) mx = plan(w, st, k, Q_HEIGHT);
    return mx;
  endfunction

  initial begin
    int exp8 [5]  = '{8, 6, 4, 3, 2};
    int exp16 [7] = '{16, 11, 8, 6, 4, 3, 2};
    checks += 2;
    if (stages(8) != 4)  begin failures++; $display("FAIL stages(8)=%0d", stages(8)); end
    if (stages(16) != 6) begin failures++; $display("FAIL stages(16)=%0d", stages(16)); end
    for (int st = 0; st < 5; st++) begin
      checks++;
      if (max_height(8, st) != exp8[st]) begin failures++; $display("FAIL 8x8 stage %0d height %0d", st, max_height(8, st)); end
    end
    for (int st = 0; st < 7; st++) begin
      checks++;
      if (max_height(16, st) != exp16[st]) begin failures++; $display("FAIL 16x16 stage %0d height %0d", st, max_height(16, st)); end
    end
    c = '0; d = '0;
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0:       begin a = '0;  b = '0;  end
        1:       begin a = '1;  b = '1;  end
        2:       begin a = '1;  b = 16'h1; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      #1;
      checks++;
      if (32'(r0 + r1) != 32'(a) * 32'(b)) begin
        failures++;
        $display("FAIL 16x16 a=%h b=%h rows %h + %h", a, b, r0, r1);
      end
    end
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        c = V'(x); d = V'(y);
        #1;
        checks++;
        if (16'(q0 + q1) != 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d rows %h + %h", x, y, q0, q1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
