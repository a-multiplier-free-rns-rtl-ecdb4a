// tb_base_ext: extends signed values of the whole range of the FMAP base {7,31,32}
// (M = 6944) and the weight base {31,32} (M = 992) to the full base and compares
// every residue with the residue of the integer itself.
module tb_base_ext;
  import rns_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  rvec_t rf, rw, xf, xw;

  base_ext #(.PRESENT(FMAP_BASE)) u_f (.r(rf), .x(xf));
  base_ext #(.PRESENT(WGT_BASE))  u_w (.r(rw), .x(xw));

  function automatic int modp(int v, int m);
    int r;
    r = v % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic rvec_t to_rns(int v, logic [NCH-1:0] mask);
    rvec_t x;
    for (int c = 0; c < NCH; c++) x[c] = mask[c] ? RW'(modp(v, int'(MODS[c]))) : RW'($urandom % 64);
    return x;
  endfunction

  task automatic cmp(rvec_t got, int v, string what);
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (int'(got[c]) != modp(v, int'(MODS[c]))) begin
        failures++;
        if (failures < 10) $display("FAIL %s value %0d channel %0d: %0d", what, v, c, got[c]);
      end
    end
  endtask

  initial begin
    for (int v = -3472; v <= 3471; v++) begin
      rf = to_rns(v, FMAP_BASE);
      rw = to_rns((v % 496), WGT_BASE);
      #1;
      cmp(xf, v, "fmap");
      cmp(xw, v % 496, "weight");
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
