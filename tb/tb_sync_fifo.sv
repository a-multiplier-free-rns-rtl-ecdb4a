// tb_sync_fifo: random pushes and pops against a queue model; checks order, data,
// the fill count, full/empty flags and that a full FIFO refuses data.
module tb_sync_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int W = 12, D = 4;
  logic         in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [2:0]   count;

  sync_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                     .out_valid, .out_ready, .out_data, .count);

  logic [W-1:0] q [$];
  int fulls = 0;

  initial begin
    in_valid = 1'b0; out_ready = 1'b0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom % 100) < ((t / 500) % 2 ? 70 : 30);
      out_ready = ($urandom % 100) < ((t / 500) % 2 ? 30 : 70);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (int'(count) != q.size() || in_ready != (q.size() < D) || out_valid != (q.size() > 0)) begin
        failures++;
        if (failures < 10) $display("FAIL flags: count %0d model %0d", count, q.size());
      end
      if (out_valid) begin
        checks++;
        if (out_data != q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL data %h expected %h", out_data, q[0]);
        end
      end
      if (!in_ready && in_valid) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL full FIFO never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
