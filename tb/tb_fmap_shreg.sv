// tb_fmap_shreg: shifts a numbered FMAP sequence x[0], x[1], ... in two per step and
// checks that after the fill steps PE i sees F0 = x[2s+i], F1 = x[2s+i+1] at kernel
// step s, that the window holds still without a shift, and that it moves by two.
module tb_fmap_shreg;
  import rns_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int NPE = 16;
  logic  shift;
  rvec_t n0, n1;
  rvec_t f0 [NPE];
  rvec_t f1 [NPE];

  fmap_shreg #(.NPE(NPE)) dut (.clk, .rst_n, .shift, .n0, .n1, .f0, .f1);

  // value x[k] encoded in the residue lanes (k in lane 0, k>>6 in lane 1)
  function automatic rvec_t xv(int k);
    rvec_t v;
    v = '0;
    v[0] = RW'(k);
    v[1] = RW'(k >> 6);
    return v;
  endfunction

  initial begin
    shift = 1'b0; n0 = '0; n1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      n0 = xv(2 * t);
      n1 = xv(2 * t + 1);
      shift = 1'b0;
      #1;
      if (t >= NPE / 2) begin
        int s;
        s = t - NPE / 2;
        for (int i = 0; i < NPE; i++) begin
          checks++;
          if (f0[i] != xv(2 * s + i) || f1[i] != xv(2 * s + i + 1)) begin
            failures++;
            if (failures < 10) $display("FAIL step %0d PE %0d", s, i);
          end
        end
      end
      // hold for a cycle (a stall): the window must not move
      @(negedge clk);
      #1;
      if (t >= NPE / 2) begin
        checks++;
        if (f0[0] != xv(2 * (t - NPE / 2))) begin
          failures++;
          $display("FAIL window moved during a stall");
        end
      end
      shift = 1'b1;
      @(negedge clk);
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
