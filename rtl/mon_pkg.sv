// mon_pkg: constants and types shared by the NoC/bus monitor blocks.
//
// Holds the debug register map of the two monitor kinds (AXI bus monitor and
// router-link monitor), the command bits that clear the measurement units,
// the AXI burst encoding, the router-link word position encoding, the CRC
// polynomial and the AXI beat address rule used for slave-side address
// calculation. The register map, the encodings of the command and filter
// control words and the CRC polynomial are choices of this design; the
// functions they serve (filters, bandwidth, latency, trigger, checksum) are
// the ones of the monitor template.
package mon_pkg;

  // ---------------------------------------------------------------- debug port
  localparam int unsigned DBG_AW    = 8;        // register word address width
  localparam int unsigned DBG_DW    = 32;       // register data width
  localparam logic [7:0]  CMD_ADDR  = 8'h7F;    // write-only command register
  localparam logic [7:0]  STAT_BASE = 8'h80;    // first read-only status word

  // command register bits (a write of 1 gives a one-cycle pulse)
  localparam int unsigned CMD_CLR_BW   = 0;     // clear bandwidth accumulators
  localparam int unsigned CMD_CLR_LAT  = 1;     // clear latency statistics and interrupt
  localparam int unsigned CMD_CLR_TRIG = 2;     // clear trigger counter and re-arm
  localparam int unsigned CMD_CLR_CRC  = 3;     // reset CRC signature to its initial value
  localparam int unsigned CMD_CLR_OVF  = 4;     // clear pending-table overflow flag

  // ------------------------------------------------------- AXI monitor map
  // Three filters (A: trigger+CRC, B: latency, C: bandwidth), 8 words each.
  localparam int unsigned AXI_FILT_WORDS = 8;
  localparam int unsigned AXI_FILT_A     = 0;
  localparam int unsigned AXI_FILT_B     = 8;
  localparam int unsigned AXI_FILT_C     = 16;
  // offsets within a filter block
  localparam int unsigned FO_CTRL    = 0;  // [0] en [1] id_en [2] writes [3] reads [15:8] ref_id
  localparam int unsigned FO_ADDR_LO = 1;
  localparam int unsigned FO_ADDR_HI = 2;
  localparam int unsigned FO_REF_LO  = 3;
  localparam int unsigned FO_REF_HI  = 4;
  localparam int unsigned FO_MASK_LO = 5;
  localparam int unsigned FO_MASK_HI = 6;
  localparam int unsigned AXI_CFG_TRIG_VAL = 24;
  localparam int unsigned AXI_CFG_LAT_MAX  = 25;
  localparam int unsigned AXI_N_CFG        = 26;
  // status words (address STAT_BASE + index)
  localparam int unsigned AXI_ST_BW_USED   = 0;
  localparam int unsigned AXI_ST_BW_TOTAL  = 1;
  localparam int unsigned AXI_ST_LAT_LAST  = 2;
  localparam int unsigned AXI_ST_LAT_MAX   = 3;
  localparam int unsigned AXI_ST_LAT_SUM   = 4;
  localparam int unsigned AXI_ST_LAT_CNT   = 5;
  localparam int unsigned AXI_ST_TRIG_CNT  = 6;
  localparam int unsigned AXI_ST_FLAGS     = 7;  // [0] trig req [1] fired [2] overflow [3] latency irq
  localparam int unsigned AXI_ST_CRC       = 8;
  localparam int unsigned AXI_N_STAT       = 9;

  // ---------------------------------------------------- router monitor map
  localparam int unsigned RT_CFG_FILT   = 0;  // [0] en [3:1] pos (hdr,body,end) [5:4] qos (BE,GT)
                                              // [7:6] eom (0,1) [15:8] word number enables
  localparam int unsigned RT_CFG_REF    = 1;
  localparam int unsigned RT_CFG_MASK   = 2;
  localparam int unsigned RT_CFG_TRIG   = 3;
  localparam int unsigned RT_N_CFG      = 4;
  localparam int unsigned RT_ST_BW_USED  = 0;
  localparam int unsigned RT_ST_BW_TOTAL = 1;
  localparam int unsigned RT_ST_TRIG_CNT = 2;
  localparam int unsigned RT_ST_FLAGS    = 3;  // [0] trig req [1] fired
  localparam int unsigned RT_ST_CRC      = 4;
  localparam int unsigned RT_N_STAT      = 5;

  // ------------------------------------------------------------------ types
  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } axi_burst_e;

  // position of a word within a NoC packet
  typedef enum logic [1:0] {
    POS_HEADER = 2'd0,
    POS_BODY   = 2'd1,
    POS_END    = 2'd2
  } pkt_pos_e;

  // ---------------------------------------------------------------- CRC-32
  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  localparam logic [31:0] CRC_INIT = 32'hFFFF_FFFF;

  // Address of the beat that follows a beat at `addr` in an AXI burst.
  function automatic logic [31:0] axi_next_addr(input logic [31:0] addr,
                                                input logic [7:0]  len,
                                                input logic [2:0]  size,
                                                input logic [1:0]  burst);
    logic [31:0] bytes, aligned, incr, wrap_bytes, lower;
    bytes      = 32'd1 << size;
    aligned    = addr & ~(bytes - 32'd1);
    incr       = aligned + bytes;
    wrap_bytes = ({24'd0, len} + 32'd1) << size;
    lower      = addr & ~(wrap_bytes - 32'd1);
    case (burst)
      BURST_FIXED: axi_next_addr = addr;
      BURST_WRAP:  axi_next_addr = (incr >= lower + wrap_bytes) ? lower : incr;
      default:     axi_next_addr = incr;
    endcase
  endfunction

endpackage
