// noc_monitor_top: debug monitoring infrastructure for a NoC-based SoC.
//
// Holds three monitors of the template, in the configurations whose cost
// was evaluated: a 64-bit AXI bus monitor and a 32-bit AXI bus monitor
// (each tracking up to 8 pending transactions with 4-bit IDs) and a router
// monitor for a 32-bit NoC link with 3-word flits. The monitored links are
// input ports: the monitors only listen. All monitors share one debug
// register port; `dbg_sel` picks the monitor (0: 64-bit AXI, 1: 32-bit AXI,
// 2: router) for both writes and reads. A TAP data register or a functional
// bus would drive this port. Each monitor has its own trigger request /
// acknowledge pair (bit 0/1/2 in the order above), to go to an interrupt
// controller or a cross-trigger network, and each AXI monitor a latency
// interrupt. Read data follows dbg_rd by one cycle, selected by the dbg_sel
// of the read.
module noc_monitor_top
  import mon_pkg::*;
#(
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned ID_W         = 4,
  parameter int unsigned MAX_PEND     = 8,
  parameter int unsigned AXI64_DATA_W = 64,
  parameter int unsigned AXI32_DATA_W = 32,
  parameter int unsigned LINK_W       = 32,
  parameter int unsigned FLIT_WORDS   = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // debug register port
  input  logic [1:0]              dbg_sel,
  input  logic [DBG_AW-1:0]       dbg_addr,
  input  logic                    dbg_wr,
  input  logic                    dbg_rd,
  input  logic [DBG_DW-1:0]       dbg_wdata,
  output logic [DBG_DW-1:0]       dbg_rdata,
  output logic [2:0]              dbg_trigger_req,
  input  logic [2:0]              dbg_trigger_ack,
  output logic [1:0]              latency_interrupt,
  // monitored 64-bit AXI link
  input  logic                    m64_awvalid, m64_awready,
  input  logic [ID_W-1:0]         m64_awid,
  input  logic [ADDR_W-1:0]       m64_awaddr,
  input  logic [7:0]              m64_awlen,
  input  logic [2:0]              m64_awsize,
  input  logic [1:0]              m64_awburst,
  input  logic                    m64_wvalid, m64_wready,
  input  logic [AXI64_DATA_W-1:0] m64_wdata,
  input  logic                    m64_wlast,
  input  logic                    m64_bvalid, m64_bready,
  input  logic [ID_W-1:0]         m64_bid,
  input  logic                    m64_arvalid, m64_arready,
  input  logic [ID_W-1:0]         m64_arid,
  input  logic [ADDR_W-1:0]       m64_araddr,
  input  logic [7:0]              m64_arlen,
  input  logic [2:0]              m64_arsize,
  input  logic [1:0]              m64_arburst,
  input  logic                    m64_rvalid, m64_rready,
  input  logic [ID_W-1:0]         m64_rid,
  input  logic [AXI64_DATA_W-1:0] m64_rdata,
  input  logic                    m64_rlast,
  // monitored 32-bit AXI link
  input  logic                    m32_awvalid, m32_awready,
  input  logic [ID_W-1:0]         m32_awid,
  input  logic [ADDR_W-1:0]       m32_awaddr,
  input  logic [7:0]              m32_awlen,
  input  logic [2:0]              m32_awsize,
  input  logic [1:0]              m32_awburst,
  input  logic                    m32_wvalid, m32_wready,
  input  logic [AXI32_DATA_W-1:0] m32_wdata,
  input  logic                    m32_wlast,
  input  logic                    m32_bvalid, m32_bready,
  input  logic [ID_W-1:0]         m32_bid,
  input  logic                    m32_arvalid, m32_arready,
  input  logic [ID_W-1:0]         m32_arid,
  input  logic [ADDR_W-1:0]       m32_araddr,
  input  logic [7:0]              m32_arlen,
  input  logic [2:0]              m32_arsize,
  input  logic [1:0]              m32_arburst,
  input  logic                    m32_rvalid, m32_rready,
  input  logic [ID_W-1:0]         m32_rid,
  input  logic [AXI32_DATA_W-1:0] m32_rdata,
  input  logic                    m32_rlast,
  // monitored router link
  input  logic                    rl_valid,
  input  logic [LINK_W-1:0]       rl_data,
  input  logic                    rl_eop,
  input  logic                    rl_eom,
  input  logic                    rl_gt
);

  logic [2:0]              sel_wr, sel_rd;
  logic [2:0][DBG_DW-1:0]  rdata;
  logic [1:0]              rsel_q;

  always_comb begin
    for (int m = 0; m < 3; m++) begin
      sel_wr[m] = dbg_wr && dbg_sel == 2'(m);
      sel_rd[m] = dbg_rd && dbg_sel == 2'(m);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rsel_q <= '0;
    else if (dbg_rd) rsel_q <= dbg_sel;
  end

  assign dbg_rdata = (rsel_q < 2'd3) ? rdata[rsel_q] : '0;

  axi_monitor #(.ADDR_W(ADDR_W), .DATA_W(AXI64_DATA_W), .ID_W(ID_W), .MAX_PEND(MAX_PEND)) u_mon64 (
    .clk, .rst_n,
    .awvalid(m64_awvalid), .awready(m64_awready), .awid(m64_awid), .awaddr(m64_awaddr),
    .awlen(m64_awlen), .awsize(m64_awsize), .awburst(m64_awburst),
    .wvalid(m64_wvalid), .wready(m64_wready), .wdata(m64_wdata), .wlast(m64_wlast),
    .bvalid(m64_bvalid), .bready(m64_bready), .bid(m64_bid),
    .arvalid(m64_arvalid), .arready(m64_arready), .arid(m64_arid), .araddr(m64_araddr),
    .arlen(m64_arlen), .arsize(m64_arsize), .arburst(m64_arburst),
    .rvalid(m64_rvalid), .rready(m64_rready), .rid(m64_rid), .rdata(m64_rdata), .rlast(m64_rlast),
    .dbg_addr, .dbg_wr(sel_wr[0]), .dbg_rd(sel_rd[0]), .dbg_wdata, .dbg_rdata(rdata[0]),
    .dbg_trigger_req(dbg_trigger_req[0]), .dbg_trigger_ack(dbg_trigger_ack[0]),
    .latency_interrupt(latency_interrupt[0])
  );

  axi_monitor #(.ADDR_W(ADDR_W), .DATA_W(AXI32_DATA_W), .ID_W(ID_W), .MAX_PEND(MAX_PEND)) u_mon32 (
    .clk, .rst_n,
    .awvalid(m32_awvalid), .awready(m32_awready), .awid(m32_awid), .awaddr(m32_awaddr),
    .awlen(m32_awlen), .awsize(m32_awsize), .awburst(m32_awburst),
    .wvalid(m32_wvalid), .wready(m32_wready), .wdata(m32_wdata), .wlast(m32_wlast),
    .bvalid(m32_bvalid), .bready(m32_bready), .bid(m32_bid),
    .arvalid(m32_arvalid), .arready(m32_arready), .arid(m32_arid), .araddr(m32_araddr),
    .arlen(m32_arlen), .arsize(m32_arsize), .arburst(m32_arburst),
    .rvalid(m32_rvalid), .rready(m32_rready), .rid(m32_rid), .rdata(m32_rdata), .rlast(m32_rlast),
    .dbg_addr, .dbg_wr(sel_wr[1]), .dbg_rd(sel_rd[1]), .dbg_wdata, .dbg_rdata(rdata[1]),
    .dbg_trigger_req(dbg_trigger_req[1]), .dbg_trigger_ack(dbg_trigger_ack[1]),
    .latency_interrupt(latency_interrupt[1])
  );

  router_monitor #(.LINK_W(LINK_W), .FLIT_WORDS(FLIT_WORDS)) u_rmon (
    .clk, .rst_n,
    .link_valid(rl_valid), .link_data(rl_data), .link_eop(rl_eop), .link_eom(rl_eom), .link_gt(rl_gt),
    .dbg_addr, .dbg_wr(sel_wr[2]), .dbg_rd(sel_rd[2]), .dbg_wdata, .dbg_rdata(rdata[2]),
    .dbg_trigger_req(dbg_trigger_req[2]), .dbg_trigger_ack(dbg_trigger_ack[2])
  );

endmodule
