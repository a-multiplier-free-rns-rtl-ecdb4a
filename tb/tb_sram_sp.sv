// tb_sram_sp: writes random words to random addresses of a small instance, reads them
// back and checks data and the one-cycle read latency.
module tb_sram_sp;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int W = 26, D = 256;
  logic         en, we;
  logic [7:0]   addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  bit           valid [D];

  sram_sp #(.W(W), .DEPTH(D)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < D; i++) valid[i] = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en    = 1'b1;
      we    = ($urandom % 2) == 0;
      addr  = 8'($urandom);
      wdata = W'($urandom);
      @(posedge clk);
      if (we) begin
        model[addr] = wdata;
        valid[addr] = 1'b1;
      end else if (valid[addr]) begin
        #1;
        checks++;
        if (rdata !== model[addr]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d read %h expected %h", addr, rdata, model[addr]);
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
