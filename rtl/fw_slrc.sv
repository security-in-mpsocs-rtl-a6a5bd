// fw_slrc: segment-level rule checking (SLRC) unit of the NoC firewall.
//
// The SLRC takes the items the OMC dispatches, one at a time. For a request it
// searches the segment table with the page number of the physical address
// (the address without its 12 offset bits). With no matching segment, or with
// checking disabled, the request is allowed at once (allow by default). On a
// match it reads the rule of (PID, segment) from the rule memory and applies it
// to the access: a denied request is dropped and reported to the INTU with its
// context, an allowed one is forwarded towards memory. For a command it writes
// the segment table, the rule memory or the monitor settings. The monitor
// counts checked, allowed and denied requests.
// The structure (segment registers with parallel comparators, an encoder, a
// rule memory indexed by PID and segment, deny rules with allow by default,
// monitors reporting to the INTU) and the latencies follow the document: an
// access that hits no segment costs 2 cycles, one that hits a segment 5 cycles,
// and a segment table command 3 cycles. The state machine that produces these
// latencies is this design's own.
//
// Timing, counted from the clock edge at which the OMC accepted the item
// (edge 0; the SLRC takes it from the OMC at edge 1):
//   request, no match or disabled : fwd_valid_o high after edge 2
//   request, segment match        : rule address at edge 2, rule at edge 3,
//                                   decision at edge 4, fwd_valid_o high or
//                                   deny_o pulse after edge 5
//   command                       : table written at edge 2, done_o pulse after
//                                   edge 3
// The SLRC takes the next item only after the forward handshake, the deny
// pulse or the done pulse of the previous one.
module fw_slrc
  import fw_pkg::*;
#(
  parameter int unsigned N_SEG = 16,
  parameter int unsigned N_PID = 64,
  localparam int unsigned IDX_W = (N_SEG > 1) ? $clog2(N_SEG) : 1,
  localparam int unsigned PID_W = $clog2(N_PID),
  localparam int unsigned RA_W  = $clog2(N_SEG * N_PID)
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         mode_en_i,   // checking enabled (OMC mode): runs the monitor timer
  // from the OMC
  input  logic         d_valid_i,
  output logic         d_ready_o,
  input  fw_disp_t     d_i,
  // to memory
  output logic         fwd_valid_o,
  input  logic         fwd_ready_i,
  output fw_req_t      fwd_o,
  // command completed
  output logic         done_o,
  // to the INTU
  output logic         deny_o,
  output fw_deny_ctx_t deny_ctx_o,
  output logic         thresh_o,
  // status
  output logic [N_SEG-1:0] seg_valid_o,
  output logic [CNT_W-1:0] n_check_o,
  output logic [CNT_W-1:0] n_allow_o,
  output logic [CNT_W-1:0] n_deny_o,
  output logic [CNT_W-1:0] timer_o
);

  typedef enum logic [2:0] {
    S_IDLE, S_CMP, S_RD, S_DEC, S_ACT, S_OUT, S_CMD, S_DONE
  } state_e;

  state_e            state_q;
  fw_disp_t          it_q;        // item being processed
  logic [IDX_W-1:0]  idx_q;       // matched segment
  logic              deny_q;      // decision
  logic [CNT_W-1:0]  thresh_q;

  logic              hit;
  logic [IDX_W-1:0]  idx;
  logic [PAGE_W-1:0] page;
  logic [RULE_W-1:0] rule;

  // Command decode of the held item (valid only in S_CMD).
  logic do_cmd;
  logic seg_wr, seg_clr, rule_wr, rule_del, mon_clr;
  assign do_cmd   = (state_q == S_CMD);
  assign seg_wr   = do_cmd && (it_q.cmd.op == CMD_ADD_SEG);
  assign seg_clr  = do_cmd && (it_q.cmd.op == CMD_DEL_ALL);
  assign rule_wr  = do_cmd && (it_q.cmd.op == CMD_SET_RULE);
  assign rule_del = do_cmd && (it_q.cmd.op == CMD_DEL_RULE);
  assign mon_clr  = do_cmd && (it_q.cmd.op == CMD_CLR_MON);

  assign page = it_q.req.addr[ADDR_W-1:OFFSET_W];

  fw_segment_table #(.N_SEG(N_SEG)) u_seg (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .page_i     (page),
    .hit_o      (hit),
    .idx_o      (idx),
    .wr_i       (seg_wr),
    .wr_idx_i   (it_q.cmd.seg[IDX_W-1:0]),
    .wr_start_i (it_q.cmd.start),
    .wr_last_i  (it_q.cmd.last),
    .clr_all_i  (seg_clr),
    .valid_o    (seg_valid_o)
  );

  fw_rule_table #(.N_SEG(N_SEG), .N_PID(N_PID)) u_rules (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .rd_i      (state_q == S_CMP && it_q.en && hit),
    .rd_addr_i (RA_W'({it_q.pid[PID_W-1:0], idx})),
    .rd_rule_o (rule),
    .wr_i      (rule_wr),
    .del_i     (rule_del),
    .wr_addr_i (RA_W'({it_q.cmd.pid[PID_W-1:0], it_q.cmd.seg[IDX_W-1:0]})),
    .wr_rule_i (it_q.cmd.rule)
  );

  logic ev_check, ev_allow, ev_deny;
  assign ev_check = (state_q == S_CMP);
  assign ev_allow = (state_q == S_CMP && !(it_q.en && hit)) || (state_q == S_ACT && !deny_q);
  assign ev_deny  = (state_q == S_ACT && deny_q);

  fw_monitor #(.W(CNT_W)) u_mon (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .en_i       (mode_en_i),
    .clr_i      (mon_clr),
    .ev_check_i (ev_check),
    .ev_allow_i (ev_allow),
    .ev_deny_i  (ev_deny),
    .thresh_i   (thresh_q),
    .n_check_o  (n_check_o),
    .n_allow_o  (n_allow_o),
    .n_deny_o   (n_deny_o),
    .timer_o    (timer_o),
    .thresh_o   (thresh_o)
  );

  assign d_ready_o = (state_q == S_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      it_q        <= '0;
      idx_q       <= '0;
      deny_q      <= 1'b0;
      thresh_q    <= '0;
      fwd_valid_o <= 1'b0;
      fwd_o       <= '0;
      done_o      <= 1'b0;
      deny_o      <= 1'b0;
      deny_ctx_o  <= '0;
    end else begin
      done_o <= 1'b0;
      deny_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (d_valid_i) begin
          it_q    <= d_i;
          state_q <= d_i.is_cmd ? S_CMD : S_CMP;
        end
        S_CMP: begin
          if (it_q.en && hit) begin
            idx_q   <= idx;
            state_q <= S_RD;
          end else begin
            fwd_valid_o <= 1'b1;
            fwd_o       <= it_q.req;
            state_q     <= S_OUT;
          end
        end
        S_RD:  state_q <= S_DEC;
        S_DEC: begin
          deny_q  <= rule_denies(rule, it_q.req.write, it_q.req.instr,
                                 it_q.req.priv, it_q.req.secure);
          state_q <= S_ACT;
        end
        S_ACT: begin
          if (deny_q) begin
            deny_o           <= 1'b1;
            deny_ctx_o.addr  <= it_q.req.addr;
            deny_ctx_o.pid   <= it_q.pid;
            deny_ctx_o.seg   <= 4'(idx_q);
            deny_ctx_o.rule  <= rule;
            deny_ctx_o.write <= it_q.req.write;
            deny_ctx_o.instr <= it_q.req.instr;
            deny_ctx_o.priv  <= it_q.req.priv;
            deny_ctx_o.secure <= it_q.req.secure;
            state_q          <= S_IDLE;
          end else begin
            fwd_valid_o <= 1'b1;
            fwd_o       <= it_q.req;
            state_q     <= S_OUT;
          end
        end
        S_OUT: if (fwd_ready_i) begin
          fwd_valid_o <= 1'b0;
          state_q     <= S_IDLE;
        end
        S_CMD: begin
          if (it_q.cmd.op == CMD_SET_THRESH) thresh_q <= CNT_W'(it_q.cmd.rule);
          state_q <= S_DONE;
        end
        S_DONE: begin
          done_o  <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A forwarded request stays valid and stable until memory takes it.
  a_fwd_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    fwd_valid_o && !fwd_ready_i |=> fwd_valid_o && $stable(fwd_o));

endmodule
