// tb_branch_cmp -- self-checking test of the branch comparators.
// Checks equality and the signed zero tests on edge values (0, 1, -1, the
// extremes) and on random pairs, half of them equal.
module tb_branch_cmp;
  logic [31:0] rs_val, rt_val;
  logic        eq, ltz, gtz;
  int checks = 0, failures = 0;

  branch_cmp dut (.rs_val, .rt_val, .eq, .ltz, .gtz);

  task automatic check(input logic [31:0] a, input logic [31:0] b);
    longint sa;
    rs_val = a; rt_val = b;
    #1;
    sa = longint'($signed(a));
    checks++;
    if (eq !== (a == b) || ltz !== (sa < 0) || gtz !== (sa > 0)) begin
      failures++;
      $display("FAIL a=%h b=%h eq=%0d ltz=%0d gtz=%0d", a, b, eq, ltz, gtz);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] edges [6] = '{32'd0, 32'd1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'd5};
    foreach (edges[i]) foreach (edges[j]) check(edges[i], edges[j]);
    for (int k = 0; k < 500; k++) begin
      logic [31:0] a;
      a = $urandom;
      check(a, ($urandom % 2) ? a : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
