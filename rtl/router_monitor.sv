// router_monitor: monitor for one NoC link between routers, or between a
// router and a network interface.
//
// Instance of the monitor template without a latency unit (data crosses a
// NoC link in fixed time). router_psfe annotates each link word (word number
// in flit, header/body/end of packet, QoS, EOM) and holds the one filter
// that all functions share. Behind it: mon_bandwidth (cycles with a matching
// word, and total cycles), mon_trigger (dbg_trigger_req when the programmed
// number of matching words is reached) and mon_crc (signature over the
// matching link words). mon_csr gives the debug register port (map in
// mon_pkg, RT_*). Event timing: one cycle of link registering in the PSFE,
// then the units update at the next clock edge. HAS_TRIGGER, HAS_CRC and
// HAS_BANDWIDTH select at design time which functions the instance holds
// (all present by default, as in the evaluated router monitor).
module router_monitor
  import mon_pkg::*;
#(
  parameter int unsigned LINK_W     = 32,
  parameter int unsigned FLIT_WORDS = 3,
  // design-time selection of the functions (template components)
  parameter bit HAS_TRIGGER   = 1'b1,
  parameter bit HAS_CRC       = 1'b1,
  parameter bit HAS_BANDWIDTH = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_valid,
  input  logic [LINK_W-1:0] link_data,
  input  logic              link_eop,
  input  logic              link_eom,
  input  logic              link_gt,
  input  logic [DBG_AW-1:0] dbg_addr,
  input  logic              dbg_wr,
  input  logic              dbg_rd,
  input  logic [DBG_DW-1:0] dbg_wdata,
  output logic [DBG_DW-1:0] dbg_rdata,
  output logic              dbg_trigger_req,
  input  logic              dbg_trigger_ack
);

  localparam int unsigned WN_W = (FLIT_WORDS > 1) ? $clog2(FLIT_WORDS) : 1;

  logic [RT_N_CFG-1:0][DBG_DW-1:0]  cfg;
  logic [RT_N_STAT-1:0][DBG_DW-1:0] stat;
  logic [DBG_DW-1:0]                cmd;
  logic [31:0]                      fctl;

  logic              w_valid, w_gt, w_eom, match;
  logic [LINK_W-1:0] w_data;
  pkt_pos_e          w_pos;
  logic [WN_W-1:0]   w_wordno;

  assign fctl = cfg[RT_CFG_FILT];

  router_psfe #(.LINK_W(LINK_W), .FLIT_WORDS(FLIT_WORDS)) u_psfe (
    .clk, .rst_n, .link_valid, .link_data, .link_eop, .link_eom, .link_gt,
    .f_en(fctl[0]), .f_pos_en(fctl[3:1]), .f_qos_en(fctl[5:4]), .f_eom_en(fctl[7:6]),
    .f_word_en(fctl[8 +: FLIT_WORDS]),
    .f_ref(LINK_W'(cfg[RT_CFG_REF])), .f_mask(LINK_W'(cfg[RT_CFG_MASK])),
    .w_valid, .w_data, .w_pos, .w_gt, .w_eom, .w_wordno, .match
  );

  logic [31:0] bw_used, bw_total, trig_cnt, crc;
  logic        fired;

  if (HAS_BANDWIDTH) begin : g_bw
    mon_bandwidth #(.CNT_W(32)) u_bw (
      .clk, .rst_n, .clr(cmd[CMD_CLR_BW]), .used(match), .used_cnt(bw_used), .total_cnt(bw_total)
    );
  end else begin : g_no_bw
    assign {bw_used, bw_total} = '0;
  end

  if (HAS_TRIGGER) begin : g_trig
    mon_trigger #(.CNT_W(32), .N_IN(1)) u_trig (
      .clk, .rst_n, .clr(cmd[CMD_CLR_TRIG]), .match(match), .trig_value(cfg[RT_CFG_TRIG]),
      .dbg_trigger_req, .dbg_trigger_ack, .count(trig_cnt), .fired
    );
  end else begin : g_no_trig
    assign dbg_trigger_req = 1'b0;
    assign trig_cnt        = '0;
    assign fired           = 1'b0;
  end

  if (HAS_CRC) begin : g_crc
    mon_crc #(.DW(LINK_W), .N_IN(1)) u_crc (
      .clk, .rst_n, .clr(cmd[CMD_CLR_CRC]), .in_v(match), .in_d(w_data), .crc
    );
  end else begin : g_no_crc
    assign crc = '0;
  end

  always_comb begin
    stat                 = '0;
    stat[RT_ST_BW_USED]  = bw_used;
    stat[RT_ST_BW_TOTAL] = bw_total;
    stat[RT_ST_TRIG_CNT] = trig_cnt;
    stat[RT_ST_FLAGS]    = {30'd0, fired, dbg_trigger_req};
    stat[RT_ST_CRC]      = crc;
  end

  mon_csr #(.N_CFG(RT_N_CFG), .N_STAT(RT_N_STAT)) u_csr (
    .clk, .rst_n, .dbg_addr, .dbg_wr, .dbg_rd, .dbg_wdata, .dbg_rdata, .cfg, .stat, .cmd
  );

endmodule
