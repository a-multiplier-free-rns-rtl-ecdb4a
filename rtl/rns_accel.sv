// rns_accel: multiplier-free RNS CNN accelerator, top level.
//
// NCORE processing cores (rns_core) each compute NPE outputs of one output channel;
// all cores see the same FMAP stream and each gets its own weights. FMAPs live in
// FMEM in the reduced FMAP base {7,31,32} (two per word), weights in WMEM in the
// reduced weight base {31,32} (one weight pair per core per word). A block buffer
// (FIFO) decouples FMEM from the cores; each core holds its own weight FIFO.
//
// One pass (start .. done) computes a tile of NCORE x NPE outputs:
//   CLR   zero the accumulators of all cores;
//   RUN   for t = 0 .. n_steps-1 read FMEM[f_base+t] (FMAP pair) and WMEM[w_base+t]
//         (one weight pair per core), queue them, and retire a step whenever every
//         core has handled it (cores that stall hold the others: all PEs of all cores
//         advance together, so one FMAP stream serves all). Steps with zero weights
//         fill the FMAP shift registers (NPE/2 such steps before each kernel row);
//   DRAIN wait until every stack has emptied into its adder;
//   WB    pass the results through the two ASP units (scaling, ReLU, 1x2 pooling)
//         and write them to FMEM from o_base on, two outputs per word: core c uses
//         words o_base + c*NPE/2 + q (or NPE/4 words with pooling).
// The host reaches FMEM and WMEM through the h_* ports while the accelerator is idle.
// Counters report the cycles, retired steps and stall cycles of the last pass.
// The paper gives 16 cores, FMEM, WMEM, block buffer, the reduced-base storage
// and the 448 KB of on-chip memory; the split of that memory (FMEM 64K x 26 bit,
// WMEM 6K x 320 bit), the step sequencer, the word formats and the sharing of two
// ASP units by all cores are this design's.
module rns_accel
  import rns_pkg::*;
#(
  parameter int unsigned NCORE  = 16,
  parameter int unsigned NPE    = 16,
  parameter int unsigned S      = 1,
  parameter enc_e        ENC    = ENC_CSD,
  parameter int unsigned FDEPTH = 65536,
  parameter int unsigned WDEPTH = 6144,
  parameter int unsigned BBUF   = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host access to FMEM (idle only)
  input  logic                        h_fm_en,
  input  logic                        h_fm_we,
  input  logic [$clog2(FDEPTH)-1:0]   h_fm_addr,
  input  logic [2*FW-1:0]             h_fm_wdata,
  output logic [2*FW-1:0]             h_fm_rdata,
  // host writes to WMEM (idle only)
  input  logic                        h_wm_we,
  input  logic [$clog2(WDEPTH)-1:0]   h_wm_addr,
  input  logic [NCORE*2*WB-1:0]       h_wm_wdata,
  // pass configuration
  input  logic                        start,
  input  logic [$clog2(FDEPTH)-1:0]   f_base,
  input  logic [$clog2(WDEPTH)-1:0]   w_base,
  input  logic [$clog2(WDEPTH):0]     n_steps,
  input  logic [$clog2(FDEPTH)-1:0]   o_base,
  input  logic [4:0]                  shift,
  input  logic                        relu_en,
  input  logic                        pool_en,
  output logic                        busy,
  output logic                        done,
  output logic [31:0]                 cyc_cnt,
  output logic [31:0]                 step_cnt,
  output logic [31:0]                 stall_cnt
);

  localparam int unsigned FA  = $clog2(FDEPTH);
  localparam int unsigned WA  = $clog2(WDEPTH);
  localparam int unsigned WMW = NCORE * 2 * WB;
  localparam int unsigned BW  = $clog2(BBUF + 1);
  localparam int unsigned QW  = $clog2(NPE / 2);
  localparam int unsigned CW  = (NCORE > 1) ? $clog2(NCORE) : 1;

  typedef enum logic [2:0] {ST_IDLE, ST_CLR, ST_RUN, ST_DRAIN, ST_WB, ST_DONE} state_e;
  state_e state;

  // ---------------------------------------------------------------- memories
  logic            fm_en, fm_we;
  logic [FA-1:0]   fm_addr;
  logic [2*FW-1:0] fm_wdata, fm_rdata;
  logic            wm_en, wm_we;
  logic [WA-1:0]   wm_addr;
  logic [WMW-1:0]  wm_rdata;

  sram_sp #(.W(2*FW), .DEPTH(FDEPTH)) u_fmem (
    .clk, .en(fm_en), .we(fm_we), .addr(fm_addr), .wdata(fm_wdata), .rdata(fm_rdata)
  );
  sram_sp #(.W(WMW), .DEPTH(WDEPTH)) u_wmem (
    .clk, .en(wm_en), .we(wm_we), .addr(wm_addr), .wdata(h_wm_wdata), .rdata(wm_rdata)
  );
  assign h_fm_rdata = fm_rdata;

  // ---------------------------------------------------------------- stream issue
  logic [WA:0]     issued, retired;
  logic            rd_issue, rd_pend;
  logic            bb_out_valid;
  logic [2*FW-1:0] bb_out;
  logic [BW-1:0]   bb_count;
  logic            step_go;
  logic            all_rdy, all_idle, any_stall;

  assign rd_issue = (state == ST_RUN) && (issued < n_steps) &&
                    ((BW+1)'(bb_count) + (BW+1)'(rd_pend) < (BW+1)'(BBUF));

  sync_fifo #(.W(2*FW), .DEPTH(BBUF)) u_bbuf (
    .clk, .rst_n,
    .in_valid(rd_pend), .in_ready(), .in_data(fm_rdata),
    .out_valid(bb_out_valid), .out_ready(step_go), .out_data(bb_out),
    .count(bb_count)
  );

  // ---------------------------------------------------------------- cores
  logic  [NCORE-1:0] c_rdy, c_idle, c_stall, c_wready;
  rvec_t             res [NCORE][NPE];
  rvec_t             bfm0, bfm1;

  assign bfm0 = funpack(bb_out[FW-1:0]);
  assign bfm1 = funpack(bb_out[2*FW-1:FW]);

  for (genvar c = 0; c < NCORE; c++) begin : g_core
    logic [2*WB-1:0] wpair;
    assign wpair = wm_rdata[c*2*WB +: 2*WB];
    rns_core #(.NPE(NPE), .S(S), .ENC(ENC), .WFIFO(BBUF)) u_core (
      .clk, .rst_n,
      .acc_clr (state == ST_CLR),
      .w_valid (rd_pend), .w_ready(c_wready[c]),
      .w0      (wunpack(wpair[WB-1:0])), .w1(wunpack(wpair[2*WB-1:WB])),
      .fm_valid(bb_out_valid), .fm0(bfm0), .fm1(bfm1),
      .step_rdy(c_rdy[c]), .step_go(step_go),
      .idle    (c_idle[c]), .stall(c_stall[c]),
      .res     (res[c])
    );
  end

  assign all_rdy   = &c_rdy;
  assign all_idle  = &c_idle;
  assign any_stall = |c_stall;
  assign step_go   = (state == ST_RUN) && bb_out_valid && all_rdy;

  // ---------------------------------------------------------------- write-back
  logic [CW-1:0] wb_core;
  logic [QW-1:0] wb_q;
  logic          wb_last;
  rvec_t         a0x0, a0x1, a1x0, a1x1, y0, y1;

  always_comb begin
    if (pool_en) begin
      a0x0 = res[wb_core][4*wb_q];
      a0x1 = res[wb_core][4*wb_q + 1];
      a1x0 = res[wb_core][4*wb_q + 2];
      a1x1 = res[wb_core][4*wb_q + 3];
    end else begin
      a0x0 = res[wb_core][2*wb_q];
      a0x1 = a0x0;
      a1x0 = res[wb_core][2*wb_q + 1];
      a1x1 = a1x0;
    end
  end

  asp_unit u_asp0 (.x0(a0x0), .x1(a0x1), .shift, .relu_en, .pool_en, .y(y0));
  asp_unit u_asp1 (.x0(a1x0), .x1(a1x1), .shift, .relu_en, .pool_en, .y(y1));

  assign wb_last = (wb_core == CW'(NCORE - 1)) &&
                   (pool_en ? (wb_q == QW'(NPE / 4 - 1)) : (wb_q == QW'(NPE / 2 - 1)));

  // ---------------------------------------------------------------- memory ports
  always_comb begin
    fm_en    = 1'b0;
    fm_we    = 1'b0;
    fm_addr  = h_fm_addr;
    fm_wdata = h_fm_wdata;
    wm_en    = 1'b0;
    wm_we    = 1'b0;
    wm_addr  = h_wm_addr;
    unique case (state)
      ST_IDLE: begin
        fm_en = h_fm_en;
        fm_we = h_fm_we;
        wm_en = h_wm_we;
        wm_we = h_wm_we;
      end
      ST_RUN: begin
        fm_en   = rd_issue;
        fm_addr = f_base + FA'(issued);
        wm_en   = rd_issue;
        wm_addr = w_base + WA'(issued);
      end
      ST_WB: begin
        fm_en    = 1'b1;
        fm_we    = 1'b1;
        fm_addr  = o_base + FA'(wb_core) * FA'(pool_en ? NPE / 4 : NPE / 2) + FA'(wb_q);
        fm_wdata = {fpack(y1), fpack(y0)};
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      issued    <= '0;
      retired   <= '0;
      rd_pend   <= 1'b0;
      wb_core   <= '0;
      wb_q      <= '0;
      cyc_cnt   <= '0;
      step_cnt  <= '0;
      stall_cnt <= '0;
    end else begin
      rd_pend <= (state == ST_RUN) && rd_issue;
      if (state != ST_IDLE && state != ST_DONE) cyc_cnt <= cyc_cnt + 1;
      if (step_go) begin
        retired  <= retired + 1'b1;
        step_cnt <= step_cnt + 1;
      end
      if (state == ST_RUN && any_stall) stall_cnt <= stall_cnt + 1;
      if (rd_issue) issued <= issued + 1'b1;
      unique case (state)
        ST_IDLE: if (start) begin
          state     <= ST_CLR;
          issued    <= '0;
          retired   <= '0;
          cyc_cnt   <= '0;
          step_cnt  <= '0;
          stall_cnt <= '0;
        end
        ST_CLR:   state <= ST_RUN;
        ST_RUN:   if (retired + $bits(retired)'(step_go) == n_steps) state <= ST_DRAIN;
        ST_DRAIN: if (all_idle) begin
          state   <= ST_WB;
          wb_core <= '0;
          wb_q    <= '0;
        end
        ST_WB: begin
          if (wb_last) state <= ST_DONE;
          else if (wb_q == (pool_en ? QW'(NPE / 4 - 1) : QW'(NPE / 2 - 1))) begin
            wb_q    <= '0;
            wb_core <= wb_core + 1'b1;
          end else wb_q <= wb_q + 1'b1;
        end
        ST_DONE:  state <= ST_IDLE;
        default:  state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);
  assign done = (state == ST_DONE);

  // the weight FIFOs and the block buffer are pushed and popped together
  assert property (@(posedge clk) disable iff (!rst_n) rd_pend |-> &c_wready)
    else $error("rns_accel: weight FIFO overflow");

endmodule
