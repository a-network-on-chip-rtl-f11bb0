// axi_monitor: bus monitor for one AXI4 link.
//
// Instance of the monitor template with all of its functions:
//  * axi_psfe turns handshakes into per-beat data events (with slave-side
//    beat address) and per-transaction completion events (with latency);
//  * filter A + mon_trigger + mon_crc: counts matching data beats, raises
//    dbg_trigger_req when the programmed count is reached, and folds
//    {beat address, data} of matching beats into a CRC signature;
//  * filter B + mon_latency: last/max/sum/count of the latency of matching
//    completed transactions, latency_interrupt above a threshold;
//  * filter C + mon_bandwidth: cycles with a matching data beat, and total
//    cycles;
//  * mon_csr: the debug register port (map in mon_pkg, AXI_*).
// Each function has its own filter, as in the evaluated bus monitors. Each
// filter is instantiated once per direction with one shared configuration,
// since read and write beats can occur in the same cycle; control bits pick
// the directions. Filter B sees no data (its data mask should be left 0).
// Measurement units update at the clock edge of the handshake; status words
// read through the register port lag by one more cycle.
// HAS_TRIGGER, HAS_CRC, HAS_LATENCY and HAS_BANDWIDTH select at design time
// which functions a monitor instance contains, as the template intends (a
// left-out function reads as zero and drives its outputs low). All default
// to 1, the configuration whose cost was evaluated.
module axi_monitor
  import mon_pkg::*;
#(
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned DATA_W   = 64,
  parameter int unsigned ID_W     = 4,
  parameter int unsigned MAX_PEND = 8,
  // design-time selection of the functions (template components)
  parameter bit HAS_TRIGGER   = 1'b1,
  parameter bit HAS_CRC       = 1'b1,
  parameter bit HAS_LATENCY   = 1'b1,
  parameter bit HAS_BANDWIDTH = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              awvalid, awready,
  input  logic [ID_W-1:0]   awid,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic [2:0]        awsize,
  input  logic [1:0]        awburst,
  input  logic              wvalid, wready,
  input  logic [DATA_W-1:0] wdata,
  input  logic              wlast,
  input  logic              bvalid, bready,
  input  logic [ID_W-1:0]   bid,
  input  logic              arvalid, arready,
  input  logic [ID_W-1:0]   arid,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  input  logic              rvalid, rready,
  input  logic [ID_W-1:0]   rid,
  input  logic [DATA_W-1:0] rdata,
  input  logic              rlast,
  // debug interface
  input  logic [DBG_AW-1:0] dbg_addr,
  input  logic              dbg_wr,
  input  logic              dbg_rd,
  input  logic [DBG_DW-1:0] dbg_wdata,
  output logic [DBG_DW-1:0] dbg_rdata,
  output logic              dbg_trigger_req,
  input  logic              dbg_trigger_ack,
  output logic              latency_interrupt
);

  localparam int unsigned LAT_W = 32;

  logic [AXI_N_CFG-1:0][DBG_DW-1:0]  cfg;
  logic [AXI_N_STAT-1:0][DBG_DW-1:0] stat;
  logic [DBG_DW-1:0]                 cmd;

  logic              wd_v, rd_v, wc_v, rc_v, ovf;
  logic [ADDR_W-1:0] wd_addr, rd_addr, wc_addr, rc_addr;
  logic [DATA_W-1:0] wd_data, rd_data;
  logic [ID_W-1:0]   wd_id, rd_id, wc_id, rc_id;
  logic [LAT_W-1:0]  wc_lat, rc_lat;

  axi_psfe #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .ID_W(ID_W), .MAX_PEND(MAX_PEND),
             .LAT_W(LAT_W)) u_psfe (
    .clk, .rst_n,
    .awvalid, .awready, .awid, .awaddr, .awlen, .awsize, .awburst,
    .wvalid, .wready, .wdata, .wlast,
    .bvalid, .bready, .bid,
    .arvalid, .arready, .arid, .araddr, .arlen, .arsize, .arburst,
    .rvalid, .rready, .rid, .rdata, .rlast,
    .clr_ovf(cmd[CMD_CLR_OVF]),
    .wd_v, .wd_addr, .wd_data, .wd_id,
    .rd_v, .rd_addr, .rd_data, .rd_id,
    .wc_v, .wc_id, .wc_addr, .wc_lat,
    .rc_v, .rc_id, .rc_addr, .rc_lat,
    .ovf
  );

  // ------------------------------------------------------------- filters
  // fm[f][0] = write-direction match, fm[f][1] = read-direction match
  logic [2:0][1:0] fm;
  localparam int unsigned FBASE [3] = '{AXI_FILT_A, AXI_FILT_B, AXI_FILT_C};

  for (genvar f = 0; f < 3; f++) begin : g_filt
    logic [31:0]       ctrl;
    logic [DATA_W-1:0] refd, mask;
    logic              w_ev, r_ev;
    logic [ADDR_W-1:0] w_ad, r_ad;
    logic [DATA_W-1:0] w_dt, r_dt;
    logic [ID_W-1:0]   w_id, r_id;
    assign ctrl = cfg[FBASE[f] + FO_CTRL];
    if (DATA_W > 32) begin : g_wide
      assign refd = DATA_W'({cfg[FBASE[f] + FO_REF_HI],  cfg[FBASE[f] + FO_REF_LO]});
      assign mask = DATA_W'({cfg[FBASE[f] + FO_MASK_HI], cfg[FBASE[f] + FO_MASK_LO]});
    end else begin : g_narrow
      assign refd = DATA_W'(cfg[FBASE[f] + FO_REF_LO]);
      assign mask = DATA_W'(cfg[FBASE[f] + FO_MASK_LO]);
    end
    if (f == 1) begin : g_cmp   // filter B: completed transactions
      assign w_ev = wc_v; assign w_ad = wc_addr; assign w_dt = '0; assign w_id = wc_id;
      assign r_ev = rc_v; assign r_ad = rc_addr; assign r_dt = '0; assign r_id = rc_id;
    end else begin : g_dat      // filters A and C: data beats
      assign w_ev = wd_v; assign w_ad = wd_addr; assign w_dt = wd_data; assign w_id = wd_id;
      assign r_ev = rd_v; assign r_ad = rd_addr; assign r_dt = rd_data; assign r_id = rd_id;
    end
    bus_filter #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .ID_W(ID_W)) u_fw (
      .en(ctrl[0]), .dir_en(ctrl[2]), .id_en(ctrl[1]),
      .addr_lo(ADDR_W'(cfg[FBASE[f] + FO_ADDR_LO])), .addr_hi(ADDR_W'(cfg[FBASE[f] + FO_ADDR_HI])),
      .ref_data(refd), .mask(mask), .ref_id(ctrl[8 +: ID_W]),
      .ev_valid(w_ev), .ev_addr(w_ad), .ev_data(w_dt), .ev_id(w_id), .match(fm[f][0]));
    bus_filter #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .ID_W(ID_W)) u_fr (
      .en(ctrl[0]), .dir_en(ctrl[3]), .id_en(ctrl[1]),
      .addr_lo(ADDR_W'(cfg[FBASE[f] + FO_ADDR_LO])), .addr_hi(ADDR_W'(cfg[FBASE[f] + FO_ADDR_HI])),
      .ref_data(refd), .mask(mask), .ref_id(ctrl[8 +: ID_W]),
      .ev_valid(r_ev), .ev_addr(r_ad), .ev_data(r_dt), .ev_id(r_id), .match(fm[f][1]));
  end

  // ------------------------------------------------- trigger and checksum
  logic [31:0] trig_cnt, crc;
  logic        fired;

  if (HAS_TRIGGER) begin : g_trig
    mon_trigger #(.CNT_W(32), .N_IN(2)) u_trig (
      .clk, .rst_n, .clr(cmd[CMD_CLR_TRIG]), .match(fm[0]),
      .trig_value(cfg[AXI_CFG_TRIG_VAL]),
      .dbg_trigger_req, .dbg_trigger_ack, .count(trig_cnt), .fired
    );
  end else begin : g_no_trig
    assign dbg_trigger_req = 1'b0;
    assign trig_cnt        = '0;
    assign fired           = 1'b0;
  end

  if (HAS_CRC) begin : g_crc
    mon_crc #(.DW(ADDR_W + DATA_W), .N_IN(2)) u_crc (
      .clk, .rst_n, .clr(cmd[CMD_CLR_CRC]), .in_v(fm[0]),
      .in_d({{rd_addr, rd_data}, {wd_addr, wd_data}}), .crc
    );
  end else begin : g_no_crc
    assign crc = '0;
  end

  // -------------------------------------------------------------- latency
  logic [31:0] lat_last, lat_max, lat_sum, lat_cnt;

  if (HAS_LATENCY) begin : g_lat
    mon_latency #(.LAT_W(LAT_W), .N_IN(2)) u_lat (
      .clk, .rst_n, .clr(cmd[CMD_CLR_LAT]), .smp_v(fm[1]), .smp({rc_lat, wc_lat}),
      .lat_max(cfg[AXI_CFG_LAT_MAX]),
      .last(lat_last), .max(lat_max), .sum(lat_sum), .count(lat_cnt), .latency_interrupt
    );
  end else begin : g_no_lat
    assign {lat_last, lat_max, lat_sum, lat_cnt} = '0;
    assign latency_interrupt = 1'b0;
  end

  // ------------------------------------------------------------ bandwidth
  logic [31:0] bw_used, bw_total;

  if (HAS_BANDWIDTH) begin : g_bw
    mon_bandwidth #(.CNT_W(32)) u_bw (
      .clk, .rst_n, .clr(cmd[CMD_CLR_BW]), .used(|fm[2]),
      .used_cnt(bw_used), .total_cnt(bw_total)
    );
  end else begin : g_no_bw
    assign {bw_used, bw_total} = '0;
  end

  // ---------------------------------------------------- control / status
  always_comb begin
    stat                  = '0;
    stat[AXI_ST_BW_USED]  = bw_used;
    stat[AXI_ST_BW_TOTAL] = bw_total;
    stat[AXI_ST_LAT_LAST] = lat_last;
    stat[AXI_ST_LAT_MAX]  = lat_max;
    stat[AXI_ST_LAT_SUM]  = lat_sum;
    stat[AXI_ST_LAT_CNT]  = lat_cnt;
    stat[AXI_ST_TRIG_CNT] = trig_cnt;
    stat[AXI_ST_FLAGS]    = {28'd0, latency_interrupt, ovf, fired, dbg_trigger_req};
    stat[AXI_ST_CRC]      = crc;
  end

  mon_csr #(.N_CFG(AXI_N_CFG), .N_STAT(AXI_N_STAT)) u_csr (
    .clk, .rst_n, .dbg_addr, .dbg_wr, .dbg_rd, .dbg_wdata, .dbg_rdata, .cfg, .stat, .cmd
  );

endmodule
