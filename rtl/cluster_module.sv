// OSort Cluster Module for LANES channels (20 in the main configuration).
// A spike arrives as a serial AXI-Stream of LANES*SAMPLES 16-bit samples. The
// Deserializer writes it row by row (one time sample of all channels per row)
// into the spike memory. LANES Arithmetic Units then work on one row per
// clock against one row of a cluster mean from the Cluster Memory: squared
// differences, summed by the Adder Tree and over the SAMPLES rows by ACC, give
// the distance to each live cluster, and the MIN register keeps the closest.
// The Threshold block compares it with T_C (set over AXI-Lite); the same
// Arithmetic Units then either blend the spike into that cluster's mean with
// the weight kept in the Local Memory or copy it into a free slot. The updated
// mean is compared with all other clusters and merged with the closest if it
// lies below T_M. The Serial Divider precomputes the weights. The number of
// the cluster that received the spike leaves on m_id (8 bits).
// Timing with L live clusters: about LANES*SAMPLES (load) + 2*L*SAMPLES
// (stages 1 and 3) + 2*(SAMPLES + 20) clocks per spike; the controller
// describes each stage.
// BRESP/RRESP (always OKAY) and the m_id bits above the cluster number width
// are constant zero.
module cluster_module
  import osort_pkg::*;
#(
  parameter int unsigned LANES    = 20,
  parameter int unsigned SAMPLES  = 64,
  parameter int unsigned CLUSTERS = 128,
  parameter int unsigned SW       = 16,
  parameter int unsigned MW       = 18,
  parameter int unsigned FRAC     = 2,
  parameter int unsigned WF       = 16,
  parameter int unsigned CNT_W    = 20,
  parameter int unsigned DIST_W   = 48
) (
  input  logic          clk,
  input  logic          rst_n,
  // spike stream
  input  logic          s_axis_tvalid,
  output logic          s_axis_tready,
  input  logic [SW-1:0] s_axis_tdata,
  input  logic          s_axis_tlast,
  // thresholds (AXI-Lite)
  input  logic          s_axil_awvalid,
  output logic          s_axil_awready,
  input  logic [3:0]    s_axil_awaddr,
  input  logic          s_axil_wvalid,
  output logic          s_axil_wready,
  input  logic [31:0]   s_axil_wdata,
  input  logic [3:0]    s_axil_wstrb,
  output logic          s_axil_bvalid,
  input  logic          s_axil_bready,
  output logic [1:0]    s_axil_bresp,
  input  logic          s_axil_arvalid,
  output logic          s_axil_arready,
  input  logic [3:0]    s_axil_araddr,
  output logic          s_axil_rvalid,
  input  logic          s_axil_rready,
  output logic [31:0]   s_axil_rdata,
  output logic [1:0]    s_axil_rresp,
  // cluster number stream
  output logic          m_id_tvalid,
  input  logic          m_id_tready,
  output logic [7:0]    m_id_tdata,
  // status
  output stage_e        stage,
  output logic          ev_new,
  output logic          ev_update,
  output logic          ev_merge,
  output logic          ev_full
);
  localparam int unsigned CIW = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1;
  localparam int unsigned RW  = (SAMPLES > 1) ? $clog2(SAMPLES) : 1;
  localparam int unsigned TGW = CIW + 2;
  localparam int unsigned SQW = 2*MW + 1;
  localparam int unsigned TOW = SQW + ((LANES > 1) ? $clog2(LANES) : 1);
  localparam int unsigned RWID = LANES * MW;

  // deserializer
  logic            load_start, load_done, ds_we;
  logic [RW-1:0]   ds_addr;
  logic [RWID-1:0] ds_data;
  // spike memory
  logic            sm_rd_en, sm_wr_au;
  logic [RW-1:0]   sm_rd_addr, sm_wr_addr;
  logic [RWID-1:0] sm_rd_data, au_row;
  // cluster memory
  logic            cm_rd_en, cm_wr_en;
  logic [CIW-1:0]  cm_rd_cluster, cm_wr_cluster;
  logic [RW-1:0]   cm_rd_row, cm_wr_row;
  logic [RWID-1:0] cm_rd_data;
  // datapath
  au_mode_e        au_mode;
  logic [WF:0]     au_w;
  logic [SQW-1:0]  au_sq [LANES];
  logic            at_valid, tr_valid, acc_valid;
  logic [TGW-1:0]  at_tag, tr_tag;
  logic [TOW-1:0]  tr_sum;
  logic [DIST_W-1:0] acc_dist, min_dist;
  logic [CIW-1:0]  acc_tag, min_tag;
  logic            min_clear, min_found, thr_sel, thr_below;
  // local memory
  logic [CIW-1:0]  lm_rd_a_addr, lm_rd_b_addr, lm_wr_addr, lm_wr_merged_to, free_idx;
  logic [CNT_W-1:0] lm_rd_a_count, lm_rd_b_count, lm_wr_count;
  logic [WF:0]     lm_rd_a_weight, lm_wr_weight;
  logic            lm_wr_en, lm_wr_alive, lm_wr_merged, any_free;
  logic [CLUSTERS-1:0] alive;
  // divider
  logic            div_start, div_done;
  logic [CNT_W:0]  div_num, div_den;
  logic [WF:0]     div_q;

  spike_deserializer #(.LANES(LANES), .SAMPLES(SAMPLES), .SW(SW), .MW(MW), .FRAC(FRAC)) u_deser (
    .clk, .rst_n, .start(load_start),
    .s_axis_tvalid, .s_axis_tready, .s_axis_tdata, .s_axis_tlast,
    .row_we(ds_we), .row_addr(ds_addr), .row_data(ds_data), .done(load_done)
  );

  spike_memory #(.LANES(LANES), .SAMPLES(SAMPLES), .MW(MW)) u_spike_mem (
    .clk,
    .wr_en(ds_we || sm_wr_au), .wr_addr(sm_wr_au ? sm_wr_addr : ds_addr),
    .wr_data(sm_wr_au ? au_row : ds_data),
    .rd_en(sm_rd_en), .rd_addr(sm_rd_addr), .rd_data(sm_rd_data)
  );

  cluster_memory #(.CLUSTERS(CLUSTERS), .LANES(LANES), .SAMPLES(SAMPLES), .MW(MW)) u_cluster_mem (
    .clk,
    .wr_en(cm_wr_en), .wr_cluster(cm_wr_cluster), .wr_row(cm_wr_row), .wr_data(au_row),
    .rd_en(cm_rd_en), .rd_cluster(cm_rd_cluster), .rd_row(cm_rd_row), .rd_data(cm_rd_data)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_au
    logic signed [MW-1:0] blend;
    arithmetic_unit #(.MW(MW), .WF(WF)) u_au (
      .clk, .mode(au_mode),
      .x(sm_rd_data[l*MW +: MW]), .m(cm_rd_data[l*MW +: MW]), .w(au_w),
      .sq(au_sq[l]), .blend
    );
    assign au_row[l*MW +: MW] = blend;
  end

  adder_tree #(.N(LANES), .IW(SQW), .TGW(TGW)) u_tree (
    .clk, .rst_n, .in_valid(at_valid), .in_tag(at_tag), .in(au_sq),
    .out_valid(tr_valid), .out_tag(tr_tag), .sum(tr_sum)
  );

  distance_accumulator #(.IW(TOW), .OW(DIST_W), .TGW(CIW)) u_acc (
    .clk, .rst_n, .in_valid(tr_valid), .in_first(tr_tag[CIW+1]), .in_last(tr_tag[CIW]),
    .in_tag(tr_tag[CIW-1:0]), .in_val(tr_sum),
    .out_valid(acc_valid), .out_dist(acc_dist), .out_tag(acc_tag)
  );

  min_register #(.DW(DIST_W), .IDW(CIW)) u_min (
    .clk, .rst_n, .clear(min_clear), .in_valid(acc_valid), .in_dist(acc_dist), .in_tag(acc_tag),
    .min_dist, .min_tag, .found(min_found)
  );

  threshold_regs #(.DW(DIST_W)) u_thr (
    .clk, .rst_n,
    .s_axil_awvalid, .s_axil_awready, .s_axil_awaddr, .s_axil_wvalid, .s_axil_wready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_bvalid, .s_axil_bready, .s_axil_bresp,
    .s_axil_arvalid, .s_axil_arready, .s_axil_araddr, .s_axil_rvalid, .s_axil_rready,
    .s_axil_rdata, .s_axil_rresp,
    .distance(min_dist), .sel(thr_sel), .below(thr_below), .t_c(), .t_m()
  );

  local_memory #(.CLUSTERS(CLUSTERS), .CNT_W(CNT_W), .WF(WF)) u_local (
    .clk, .rst_n,
    .rd_a_addr(lm_rd_a_addr), .rd_a_count(lm_rd_a_count), .rd_a_weight(lm_rd_a_weight),
    .rd_b_addr(lm_rd_b_addr), .rd_b_count(lm_rd_b_count), .rd_b_weight(),
    .wr_en(lm_wr_en), .wr_addr(lm_wr_addr), .wr_alive(lm_wr_alive), .wr_count(lm_wr_count),
    .wr_weight(lm_wr_weight), .wr_merged(lm_wr_merged), .wr_merged_to(lm_wr_merged_to),
    .alive, .merged(), .merged_to(), .free_idx, .any_free
  );

  serial_divider #(.NW(CNT_W + 1), .WF(WF)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(), .done(div_done), .q(div_q)
  );

  osort_controller #(.CLUSTERS(CLUSTERS), .SAMPLES(SAMPLES), .CNT_W(CNT_W), .WF(WF)) u_ctrl (
    .clk, .rst_n,
    .spike_waiting(s_axis_tvalid), .load_start, .load_done,
    .sm_rd_en, .sm_rd_addr, .sm_wr_au, .sm_wr_addr,
    .cm_rd_en, .cm_rd_cluster, .cm_rd_row, .cm_wr_en, .cm_wr_cluster, .cm_wr_row,
    .au_mode, .au_w, .at_valid, .at_tag,
    .min_clear, .min_tag, .min_found, .thr_sel, .thr_below,
    .lm_rd_a_addr, .lm_rd_a_count, .lm_rd_a_weight, .lm_rd_b_addr, .lm_rd_b_count,
    .lm_wr_en, .lm_wr_addr, .lm_wr_alive, .lm_wr_count, .lm_wr_weight, .lm_wr_merged, .lm_wr_merged_to,
    .alive, .free_idx, .any_free,
    .div_start, .div_num, .div_den, .div_done, .div_q,
    .m_id_tvalid, .m_id_tready, .m_id_tdata,
    .stage, .ev_new, .ev_update, .ev_merge, .ev_full
  );
endmodule
