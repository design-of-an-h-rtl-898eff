// tb_lpl_tag_decision -- exhaustive check of the 4x3 TAG template decision.
// All 32 combinations of a, c, e, f, g are applied. The expected prediction
// and table row are written out by hand below, one line per combination
// group, from the decision table: a==f -> f, a==g -> e, c==g -> g,
// otherwise majority of e, f, g (rows tried in order).
module tb_lpl_tag_decision;
  import lpl_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a, c, e, f, g, x;
  rule_e rule;

  lpl_tag_decision dut (.a, .c, .e, .f, .g, .x, .rule);

  initial begin
    int n_rule [4];
    for (int k = 0; k < 4; k++) n_rule[k] = 0;
    for (int v = 0; v < 32; v++) begin
      logic exp_x;
      int   exp_r;
      {a, c, e, f, g} = 5'(v);
      @(negedge clk);
      // a and f agree: follow f
      if ((a && f) || (!a && !f)) begin exp_r = 0; exp_x = f; end
      // a disagrees with f but agrees with g (so f != g): follow e
      else if ((a && g) || (!a && !g)) begin exp_r = 1; exp_x = e; end
      // c agrees with g: follow g
      else if ((c && g) || (!c && !g)) begin exp_r = 2; exp_x = g; end
      // here a differs from both f and g, so f == g and they are the majority
      else begin exp_r = 3; exp_x = f; end
      n_rule[exp_r]++;
      checks++;
      if (x !== exp_x || int'(rule) != exp_r) begin
        failures++;
        $display("FAIL a%0d c%0d e%0d f%0d g%0d: x=%0d rule=%0d exp %0d/%0d",
                 a, c, e, f, g, x, rule, exp_x, exp_r);
      end
    end
    // every table row is reachable
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_rule[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
