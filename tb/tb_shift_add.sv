// tb_shift_add: for every channel of the full base, random accumulator sets are
// combined and compared with sum(2^j * Y_j) mod m computed in integers.
module tb_shift_add;
  import rns_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  res_t y [NCH][MAXD];
  res_t r [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_c
    shift_add #(.MOD(MODS[c])) u_sa (.y(y[c]), .r(r[c]));
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e [NCH];
      for (int c = 0; c < NCH; c++) begin
        e[c] = 0;
        for (int j = 0; j < MAXD; j++) begin
          y[c][j] = (j < int'(NDIG[c])) ? RW'($urandom % MODS[c]) : '0;
          if (t == 0) y[c][j] = (j < int'(NDIG[c])) ? RW'(MODS[c] - 1) : '0;
          e[c] += int'(y[c][j]) << j;
        end
        e[c] = e[c] % int'(MODS[c]);
      end
      #1;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (int'(r[c]) != e[c]) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d result %0d expected %0d", MODS[c], r[c], e[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
