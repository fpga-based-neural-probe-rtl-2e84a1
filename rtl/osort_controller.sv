// Sequencer of the multi-channel OSort Cluster Module. For every spike it runs
//   LOAD   the deserializer fills the spike memory (LANES*SAMPLES clocks);
//   S1     distance pass: for each live cluster, SAMPLES rows of the spike and
//          of the cluster mean are read, one row per clock, into the
//          Arithmetic Units (squared difference), Adder Tree, ACC and MIN;
//   DECIDE if the minimum is below T_C the spike joins that cluster with the
//          stored weight 1/(n+1); otherwise it becomes a new cluster in the
//          lowest free slot (weight 1.0, a copy). With all slots in use the
//          spike joins the closest cluster (this design's choice);
//   S2     update pass: m + w(x - m) for every row, written to the Cluster
//          Memory and back into the spike memory;
//   UPD    the Serial Divider computes 1/(n+2) for the next spike; count and
//          weight are written to the Local Memory;
//   S3     distance pass of the updated mean against every other live cluster;
//   DEC3   if the minimum is below T_M, the divider computes n/(n+m) (MDIV);
//   S4     merge pass: B + (A - B) n/(n+m) written to cluster B;
//   MUPD   A is freed and entered in the merge table, B gets count n+m and
//          weight 1/(n+m+1);
//   OUT    the final cluster number (B after a merge, else the updated one)
//          is offered on the output stream.
// Pipeline of a distance pass (issue on clock t): memories t+1, Arithmetic
// Units t+2, Adder Tree t+3, ACC t+4, MIN updated at the end of t+4; the pass
// therefore takes live*SAMPLES + DIST_DRAIN + 1 clocks. An update/merge pass
// writes row r two clocks after issuing it and takes SAMPLES + 3 clocks.
// Only one merge is made per spike; then the module waits for the next spike.
// m_id is 8 bits wide; bits above the cluster number width stay zero.
module osort_controller
  import osort_pkg::*;
#(
  parameter int unsigned CLUSTERS = 128,
  parameter int unsigned SAMPLES  = 64,
  parameter int unsigned CNT_W    = 20,
  parameter int unsigned WF       = 16,
  localparam int unsigned CIW     = (CLUSTERS > 1) ? $clog2(CLUSTERS) : 1,
  localparam int unsigned RW      = (SAMPLES > 1) ? $clog2(SAMPLES) : 1,
  localparam int unsigned TGW     = CIW + 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // spike input
  input  logic                spike_waiting,   // input stream has a beat
  output logic                load_start,
  input  logic                load_done,
  // spike memory
  output logic                sm_rd_en,
  output logic [RW-1:0]       sm_rd_addr,
  output logic                sm_wr_au,        // write the AU results
  output logic [RW-1:0]       sm_wr_addr,
  // cluster memory
  output logic                cm_rd_en,
  output logic [CIW-1:0]      cm_rd_cluster,
  output logic [RW-1:0]       cm_rd_row,
  output logic                cm_wr_en,
  output logic [CIW-1:0]      cm_wr_cluster,
  output logic [RW-1:0]       cm_wr_row,
  // arithmetic units
  output au_mode_e            au_mode,
  output logic [WF:0]         au_w,
  // adder tree input tag {first, last, cluster}
  output logic                at_valid,
  output logic [TGW-1:0]      at_tag,
  // MIN register and threshold
  output logic                min_clear,
  input  logic [CIW-1:0]      min_tag,
  input  logic                min_found,
  output logic                thr_sel,         // 0: T_C, 1: T_M
  input  logic                thr_below,
  // local memory
  output logic [CIW-1:0]      lm_rd_a_addr,
  input  logic [CNT_W-1:0]    lm_rd_a_count,
  input  logic [WF:0]         lm_rd_a_weight,
  output logic [CIW-1:0]      lm_rd_b_addr,
  input  logic [CNT_W-1:0]    lm_rd_b_count,
  output logic                lm_wr_en,
  output logic [CIW-1:0]      lm_wr_addr,
  output logic                lm_wr_alive,
  output logic [CNT_W-1:0]    lm_wr_count,
  output logic [WF:0]         lm_wr_weight,
  output logic                lm_wr_merged,
  output logic [CIW-1:0]      lm_wr_merged_to,
  input  logic [CLUSTERS-1:0] alive,
  input  logic [CIW-1:0]      free_idx,
  input  logic                any_free,
  // serial divider
  output logic                div_start,
  output logic [CNT_W:0]      div_num,
  output logic [CNT_W:0]      div_den,
  input  logic                div_done,
  input  logic [WF:0]         div_q,
  // result stream
  output logic                m_id_tvalid,
  input  logic                m_id_tready,
  output logic [7:0]          m_id_tdata,
  // status
  output stage_e              stage,
  output logic                ev_new,
  output logic                ev_update,
  output logic                ev_merge,
  output logic                ev_full
);
  localparam int unsigned DIST_DRAIN  = 4;
  localparam int unsigned BLEND_DRAIN = 2;
  localparam logic [WF:0] W_ONE = (WF+1)'(1) << WF;

  stage_e          state;
  logic            issuing;
  logic [2:0]      drain;
  logic [CIW-1:0]  cur_c;
  logic [RW-1:0]   cur_row;
  logic [CIW-1:0]  tgt, mrg_b, final_id;
  logic            ex_en;
  logic            is_new;
  logic [WF:0]     w_reg;
  logic [CNT_W-1:0] cnt_reg, nsum;
  // write-back delay line of update/merge passes
  logic [1:0]      wb_v;
  logic [RW-1:0]   wb_row [2];
  // tag delay line of distance passes
  logic [1:0]      tg_v;
  logic [TGW-1:0]  tg_q [2];

  // Lowest live cluster at or above 'from', optionally skipping one slot.
  function automatic logic [CIW:0] live_from(input logic [CIW:0] from, input logic skip,
                                             input logic [CIW-1:0] sk, input logic [CLUSTERS-1:0] al);
    logic [CIW:0] r;
    r = {1'b1, {CIW{1'b0}}};   // "none"
    for (int i = CLUSTERS - 1; i >= 0; i--)
      if (al[i] && (CIW+1)'(i) >= from && !(skip && CIW'(i) == sk)) r = (CIW+1)'(i);
    return r;
  endfunction

  logic [CIW:0] first_s1, first_s3, next_live;
  logic         last_row, dist_pass, blend_pass;
  logic         go_s1, go_s3;

  assign first_s1  = live_from('0, 1'b0, '0, alive);
  assign first_s3  = live_from('0, 1'b1, tgt, alive);
  assign next_live = live_from((CIW+1)'(cur_c) + 1'b1, ex_en, tgt, alive);
  assign last_row  = (cur_row == RW'(SAMPLES-1));
  assign dist_pass  = (state == ST_S1) || (state == ST_S3);
  assign blend_pass = (state == ST_S2) || (state == ST_S4);
  assign go_s1 = (state == ST_LOAD) && load_done;
  assign go_s3 = (state == ST_UPD) && div_done;
  assign min_clear = go_s1 || go_s3;

  // memory reads of the passes
  assign sm_rd_en      = issuing && (dist_pass || blend_pass);
  assign sm_rd_addr    = cur_row;
  assign cm_rd_en      = sm_rd_en;
  assign cm_rd_cluster = (state == ST_S4) ? mrg_b : (blend_pass ? tgt : cur_c);
  assign cm_rd_row     = cur_row;
  assign cm_wr_en      = wb_v[1];
  assign cm_wr_cluster = (state == ST_S4) ? mrg_b : tgt;
  assign cm_wr_row     = wb_row[1];
  assign sm_wr_au      = wb_v[1] && (state == ST_S2);
  assign sm_wr_addr    = wb_row[1];
  assign au_mode       = blend_pass ? AU_BLEND : AU_DIST;
  assign au_w          = w_reg;
  assign at_valid      = tg_v[1];
  assign at_tag        = tg_q[1];
  assign thr_sel       = (state == ST_DEC3);
  assign lm_rd_a_addr  = (state == ST_DECIDE) ? min_tag : tgt;
  assign lm_rd_b_addr  = min_tag;
  assign stage         = state;
  assign m_id_tvalid   = (state == ST_OUT);
  assign m_id_tdata    = 8'(final_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      issuing    <= 1'b0;
      drain      <= '0;
      cur_c      <= '0;
      cur_row    <= '0;
      tgt        <= '0;
      mrg_b      <= '0;
      final_id   <= '0;
      ex_en      <= 1'b0;
      is_new     <= 1'b0;
      w_reg      <= '0;
      cnt_reg    <= '0;
      nsum       <= '0;
      wb_v       <= '0;
      wb_row     <= '{default: '0};
      tg_v       <= '0;
      tg_q       <= '{default: '0};
      load_start <= 1'b0;
      div_start  <= 1'b0;
      div_num    <= '0;
      div_den    <= '0;
      lm_wr_en   <= 1'b0;
      lm_wr_addr <= '0;
      lm_wr_alive <= 1'b0;
      lm_wr_count <= '0;
      lm_wr_weight <= '0;
      lm_wr_merged <= 1'b0;
      lm_wr_merged_to <= '0;
      ev_new     <= 1'b0;
      ev_update  <= 1'b0;
      ev_merge   <= 1'b0;
      ev_full    <= 1'b0;
    end else begin
      load_start <= 1'b0;
      div_start  <= 1'b0;
      lm_wr_en   <= 1'b0;
      ev_new     <= 1'b0;
      ev_update  <= 1'b0;
      ev_merge   <= 1'b0;
      ev_full    <= 1'b0;
      // delay lines
      wb_v   <= {wb_v[0], issuing && blend_pass};
      wb_row <= '{cur_row, wb_row[0]};
      tg_v   <= {tg_v[0], issuing && dist_pass};
      tg_q   <= '{{cur_row == '0, last_row, cur_c}, tg_q[0]};

      // row / cluster stepping shared by all passes
      if (issuing) begin
        cur_row <= cur_row + 1'b1;
        if (last_row) begin
          cur_row <= '0;
          if (dist_pass && !next_live[CIW]) cur_c <= next_live[CIW-1:0];
          else                              issuing <= 1'b0;
        end
      end else if (dist_pass || blend_pass) begin
        drain <= drain + 1'b1;
      end

      unique case (state)
        ST_IDLE: if (spike_waiting) begin
          state      <= ST_LOAD;
          load_start <= 1'b1;
        end
        ST_LOAD: if (go_s1) begin
          state   <= ST_S1;
          ex_en   <= 1'b0;
          issuing <= !first_s1[CIW];
          cur_c   <= first_s1[CIW-1:0];
          cur_row <= '0;
          drain   <= '0;
        end
        ST_S1: if (!issuing && drain == 3'(DIST_DRAIN)) state <= ST_DECIDE;
        ST_DECIDE: begin
          state   <= ST_S2;
          issuing <= 1'b1;
          cur_row <= '0;
          drain   <= '0;
          if (min_found && (thr_below || !any_free)) begin
            tgt       <= min_tag;
            is_new    <= 1'b0;
            w_reg     <= lm_rd_a_weight;
            ev_update <= 1'b1;
            ev_full   <= !thr_below;
          end else begin
            tgt    <= free_idx;
            is_new <= 1'b1;
            w_reg  <= W_ONE;
            ev_new <= 1'b1;
          end
        end
        ST_S2: if (!issuing && drain == 3'(BLEND_DRAIN)) begin
          state     <= ST_UPD;
          cnt_reg   <= is_new ? CNT_W'(1) : lm_rd_a_count + 1'b1;
          div_start <= 1'b1;
          div_num   <= (CNT_W+1)'(1);
          div_den   <= is_new ? (CNT_W+1)'(2) : (CNT_W+1)'(lm_rd_a_count) + (CNT_W+1)'(2);
        end
        ST_UPD: if (go_s3) begin
          lm_wr_en        <= 1'b1;
          lm_wr_addr      <= tgt;
          lm_wr_alive     <= 1'b1;
          lm_wr_count     <= cnt_reg;
          lm_wr_weight    <= div_q;
          lm_wr_merged    <= 1'b0;
          lm_wr_merged_to <= '0;
          state   <= ST_S3;
          ex_en   <= 1'b1;
          issuing <= !first_s3[CIW];
          cur_c   <= first_s3[CIW-1:0];
          cur_row <= '0;
          drain   <= '0;
        end
        ST_S3: if (!issuing && drain == 3'(DIST_DRAIN)) state <= ST_DEC3;
        ST_DEC3: begin
          if (min_found && thr_below) begin
            state     <= ST_MDIV;
            mrg_b     <= min_tag;
            nsum      <= lm_rd_a_count + lm_rd_b_count;
            div_start <= 1'b1;
            div_num   <= (CNT_W+1)'(lm_rd_a_count);
            div_den   <= (CNT_W+1)'(lm_rd_a_count) + (CNT_W+1)'(lm_rd_b_count);
          end else begin
            state    <= ST_OUT;
            final_id <= tgt;
          end
        end
        ST_MDIV: if (div_done) begin
          state   <= ST_S4;
          w_reg   <= div_q;
          issuing <= 1'b1;
          cur_row <= '0;
          drain   <= '0;
        end
        ST_S4: if (!issuing && drain == 3'(BLEND_DRAIN)) begin
          state           <= ST_MUPD;
          ev_merge        <= 1'b1;
          lm_wr_en        <= 1'b1;
          lm_wr_addr      <= tgt;
          lm_wr_alive     <= 1'b0;
          lm_wr_count     <= lm_rd_a_count;
          lm_wr_weight    <= lm_rd_a_weight;
          lm_wr_merged    <= 1'b1;
          lm_wr_merged_to <= mrg_b;
          div_start <= 1'b1;
          div_num   <= (CNT_W+1)'(1);
          div_den   <= (CNT_W+1)'(nsum) + 1'b1;
        end
        ST_MUPD: if (div_done) begin
          lm_wr_en        <= 1'b1;
          lm_wr_addr      <= mrg_b;
          lm_wr_alive     <= 1'b1;
          lm_wr_count     <= nsum;
          lm_wr_weight    <= div_q;
          lm_wr_merged    <= 1'b0;
          lm_wr_merged_to <= '0;
          state    <= ST_OUT;
          final_id <= mrg_b;
        end
        ST_OUT: if (m_id_tready) state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The result stays offered until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               m_id_tvalid && !m_id_tready |=> m_id_tvalid && $stable(m_id_tdata));
endmodule
