// forest_ctrl: burst controller of the tree forest.
//
// One command runs a whole burst: the host sets the number of features per
// inference (n_feat) and the number of inferences (n_infer), picks the
// memory bank, and pulses start; done rises when every prediction of the
// burst is in the prediction memory. Inside, three activities overlap:
//  * fill: feature vector i is copied from the feature memory (stored densely,
//    feature f of inference i at word i*n_feat+f of the chosen bank) into the
//    free bank of the ping-pong feature registers, one word per clock, the
//    memory read taking one clock;
//  * compute: when the trees are idle and a register bank is full, all trees
//    are started together on that bank; when all report done their leaf
//    values are handed to the adder tree tagged with the inference number,
//    and the bank is released for the next fill;
//  * write-back: each sum leaving the adder tree is written to the prediction
//    memory (same bank) at the word given by its tag.
// So vector i+1 is loaded while vector i is being traversed, and the sum of
// vector i runs while vector i+1 is traversed. The host must keep
// n_infer*n_feat within the feature memory bank and n_infer within the
// prediction bank (the register interface refuses larger values). cycles
// counts the clocks from start to done of the last burst. Burst operation and
// the ping-pong registers follow the document; the fill order, the schedule
// and the cycle counter are this design's choices.
module forest_ctrl #(
  parameter int unsigned N_FEATURES = 256,
  parameter int unsigned FMEM_DEPTH = 4096,
  parameter int unsigned PMEM_DEPTH = 1024,
  localparam int unsigned FW  = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1,
  localparam int unsigned NFW = $clog2(N_FEATURES + 1),
  localparam int unsigned FAW = (FMEM_DEPTH > 1) ? $clog2(FMEM_DEPTH) : 1,
  localparam int unsigned PAW = (PMEM_DEPTH > 1) ? $clog2(PMEM_DEPTH) : 1,
  localparam int unsigned NIW = $clog2(PMEM_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // command
  input  logic           start,
  input  logic           bank,
  input  logic [NFW-1:0] n_feat,
  input  logic [NIW-1:0] n_infer,
  output logic           busy,
  output logic           done,
  output logic [31:0]    cycles,
  output logic           mem_bank,   // bank latched at start, for both memories
  // feature memory read port (bank is mem_bank)
  output logic           fmem_re,
  output logic [FAW-1:0] fmem_raddr,
  // feature register write port (data comes from the feature memory)
  output logic           freg_we,
  output logic           freg_bank,
  output logic [FW-1:0]  freg_idx,
  // trees
  output logic           tree_start,
  output logic           tree_bank,
  input  logic           trees_done,
  // adder tree
  output logic           sum_valid,
  output logic [PAW-1:0] sum_tag,
  input  logic           res_valid,
  input  logic [PAW-1:0] res_tag,
  // prediction memory write port (bank is mem_bank)
  output logic           pmem_we,
  output logic [PAW-1:0] pmem_waddr
);
  logic           bank_q;
  logic [1:0]     full;
  // fill
  logic           filling;
  logic           fill_bank;
  logic [NIW-1:0] load_cnt;
  logic [NFW-1:0] feat_cnt;
  logic [FAW-1:0] faddr;
  logic           wr_pend, wr_last;
  logic [FW-1:0]  wr_idx;
  // compute
  logic           running;
  logic           comp_bank;
  logic [NIW-1:0] comp_cnt;
  logic [PAW-1:0] cur_tag;
  // write-back
  logic [NIW-1:0] wb_cnt;

  logic fill_go, fill_issue, fill_last, comp_go, comp_end, wb_last;
  logic [NFW-1:0] nf;

  always_comb begin
    nf         = (n_feat == '0) ? NFW'(1) : n_feat;
    fill_go    = busy && !filling && !wr_pend && (load_cnt < n_infer) && !full[fill_bank];
    fill_issue = filling;
    fill_last  = filling && (feat_cnt == nf - NFW'(1));
    comp_go    = busy && !running && full[comp_bank] && (comp_cnt < n_infer);
    comp_end   = running && trees_done;
    wb_last    = res_valid && (wb_cnt == n_infer - NIW'(1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      cycles    <= '0;
      bank_q    <= 1'b0;
      full      <= '0;
      filling   <= 1'b0;
      fill_bank <= 1'b0;
      load_cnt  <= '0;
      feat_cnt  <= '0;
      faddr     <= '0;
      wr_pend   <= 1'b0;
      wr_last   <= 1'b0;
      wr_idx    <= '0;
      running   <= 1'b0;
      comp_bank <= 1'b0;
      comp_cnt  <= '0;
      cur_tag   <= '0;
      wb_cnt    <= '0;
    end else if (start && !busy) begin
      busy      <= (n_infer != '0);
      done      <= (n_infer == '0);
      cycles    <= '0;
      bank_q    <= bank;
      full      <= '0;
      filling   <= 1'b0;
      fill_bank <= 1'b0;
      load_cnt  <= '0;
      feat_cnt  <= '0;
      faddr     <= '0;
      wr_pend   <= 1'b0;
      wr_last   <= 1'b0;
      running   <= 1'b0;
      comp_bank <= 1'b0;
      comp_cnt  <= '0;
      wb_cnt    <= '0;
    end else if (busy) begin
      cycles <= cycles + 32'd1;

      // ---- fill ----
      if (fill_go) begin
        filling  <= 1'b1;
        feat_cnt <= '0;
      end else if (filling) begin
        faddr    <= faddr + FAW'(1);
        feat_cnt <= feat_cnt + NFW'(1);
        if (fill_last) filling <= 1'b0;
      end
      wr_pend <= fill_issue;
      wr_last <= fill_last;
      wr_idx  <= FW'(feat_cnt);
      if (wr_pend && wr_last) begin
        load_cnt  <= load_cnt + NIW'(1);
        fill_bank <= ~fill_bank;
      end

      // ---- compute ----
      if (comp_go) begin
        running  <= 1'b1;
        cur_tag  <= PAW'(comp_cnt);
        comp_cnt <= comp_cnt + NIW'(1);
      end else if (comp_end) begin
        running   <= 1'b0;
        comp_bank <= ~comp_bank;
      end

      // bank occupancy: set by the last fill write, cleared when trees finish
      for (int b = 0; b < 2; b++) begin
        if (wr_pend && wr_last && fill_bank == 1'(b)) full[b] <= 1'b1;
        else if (comp_end && comp_bank == 1'(b))      full[b] <= 1'b0;
      end

      // ---- write-back ----
      if (res_valid) wb_cnt <= wb_cnt + NIW'(1);
      if (wb_last) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign mem_bank   = bank_q;
  assign fmem_re    = fill_issue;
  assign fmem_raddr = faddr;
  assign freg_we    = wr_pend;
  assign freg_bank  = fill_bank;
  assign freg_idx   = wr_idx;
  assign tree_start = comp_go;
  assign tree_bank  = comp_bank;
  assign sum_valid  = comp_end;
  assign sum_tag    = cur_tag;
  assign pmem_we    = res_valid && busy;
  assign pmem_waddr = res_tag;

  // the same register bank is never filled and traversed at once
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (freg_we && running) |-> (freg_bank != comp_bank));
  // a result never arrives when none is outstanding
  a_wb_bound: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> (wb_cnt < comp_cnt));
endmodule
