// axi_pend_table: store of pending AXI transactions for one direction.
//
// Each accepted address (AR or AW handshake, `alloc`) takes a free entry that
// keeps the transaction ID, the address of its next data beat, its burst
// length/size/type, its start address and its issue time. Data beats look
// up their entry to learn their own (slave-side) address, which advances by
// the AXI FIXED/INCR/WRAP rule after each beat. A completion (`cmp`) frees
// the entry and reports its start address and issue time, from which the
// monitor computes the transaction latency.
//
// AXI returns data and responses in order per ID but not across IDs, so the
// store is one FIFO per ID, built as a table: each entry holds its rank, the
// number of older pending entries with the same ID, and the entry of rank 0
// is the one an ID's next beat or response belongs to. For writes
// (IS_WRITE = 1, AXI4: write data carries no ID and follows address order)
// a second rank counts the older entries still receiving data, and data
// beats go to the entry of data rank 0; completion is the B handshake. For
// reads the completion is the last read beat, with `cmp_id` equal to the
// beat's ID. Lookups are combinational (same cycle as the handshake);
// updates happen at the clock edge. An address that finds the table full is
// not tracked and pulses `overflow`. A write beat with no entry (data ahead
// of its address) gets beat_hit = 0.
module axi_pend_table
  import mon_pkg::*;
#(
  parameter int unsigned MAX_PEND = 8,
  parameter int unsigned ID_W     = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned TS_W     = 32,
  parameter bit          IS_WRITE = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   now,
  // address handshake
  input  logic              alloc,
  input  logic [ID_W-1:0]   a_id,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [7:0]        a_len,
  input  logic [2:0]        a_size,
  input  logic [1:0]        a_burst,
  // data beat handshake
  input  logic              beat,
  input  logic [ID_W-1:0]   beat_id,     // read data ID (unused for writes)
  input  logic              beat_last,
  output logic              beat_hit,
  output logic [ADDR_W-1:0] beat_addr,
  output logic [ID_W-1:0]   beat_eid,    // ID of the entry the beat belongs to
  // completion
  input  logic              cmp,
  input  logic [ID_W-1:0]   cmp_id,
  output logic              cmp_hit,
  output logic [ADDR_W-1:0] cmp_addr,
  output logic [TS_W-1:0]   cmp_ts,
  output logic              full,
  output logic              overflow
);

  localparam int unsigned RK_W = $clog2(MAX_PEND + 1);
  localparam int unsigned IX_W = (MAX_PEND > 1) ? $clog2(MAX_PEND) : 1;

  logic [MAX_PEND-1:0]             vld, ddone;
  logic [MAX_PEND-1:0][ID_W-1:0]   id;
  logic [MAX_PEND-1:0][RK_W-1:0]   irank, drank;
  logic [MAX_PEND-1:0][ADDR_W-1:0] cur, start;
  logic [MAX_PEND-1:0][7:0]        len;
  logic [MAX_PEND-1:0][2:0]        size;
  logic [MAX_PEND-1:0][1:0]        burst;
  logic [MAX_PEND-1:0][TS_W-1:0]   ts;

  logic [MAX_PEND-1:0] bsel, csel;
  logic [IX_W-1:0]     bix, cix, fix;
  logic                free_ok, do_alloc, wlast_done;
  logic [RK_W-1:0]     n_same_id, n_receiving;

  always_comb begin
    bsel = '0; csel = '0;
    bix = '0; cix = '0; fix = '0; free_ok = 1'b0;
    n_same_id = '0; n_receiving = '0;
    for (int i = 0; i < int'(MAX_PEND); i++) begin
      if (IS_WRITE) bsel[i] = vld[i] && !ddone[i] && drank[i] == '0;
      else          bsel[i] = vld[i] && id[i] == beat_id && irank[i] == '0;
      csel[i] = vld[i] && id[i] == cmp_id && irank[i] == '0;
    end
    for (int i = int'(MAX_PEND) - 1; i >= 0; i--) begin
      if (bsel[i]) bix = IX_W'(i);
      if (csel[i]) cix = IX_W'(i);
      if (!vld[i]) begin fix = IX_W'(i); free_ok = 1'b1; end
    end
    beat_hit  = beat && |bsel;
    beat_addr = beat_hit ? cur[bix] : '0;
    beat_eid  = beat_hit ? id[bix] : '0;
    cmp_hit   = cmp && |csel;
    cmp_addr  = cmp_hit ? start[cix] : '0;
    cmp_ts    = cmp_hit ? ts[cix] : '0;
    full      = !free_ok;
    do_alloc  = alloc && free_ok;
    wlast_done = IS_WRITE && beat_hit && beat_last;
    // ranks of a new entry: older entries that stay pending after this cycle
    for (int i = 0; i < int'(MAX_PEND); i++) begin
      if (vld[i] && id[i] == a_id && !(cmp_hit && IX_W'(i) == cix)) n_same_id++;
      if (vld[i] && !ddone[i] && !(wlast_done && IX_W'(i) == bix))  n_receiving++;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; ddone <= '0; id <= '0; irank <= '0; drank <= '0;
      cur <= '0; start <= '0; len <= '0; size <= '0; burst <= '0; ts <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= alloc && !free_ok;
      for (int i = 0; i < int'(MAX_PEND); i++) begin
        // a data beat advances its entry's address
        if (beat_hit && IX_W'(i) == bix) begin
          cur[i] <= ADDR_W'(axi_next_addr(32'(cur[i]), len[i], size[i], burst[i]));
          if (wlast_done) ddone[i] <= 1'b1;
        end
        // the other entries still receiving data move up one place
        if (wlast_done && vld[i] && !ddone[i] && IX_W'(i) != bix && drank[i] != '0)
          drank[i] <= drank[i] - 1'b1;
        // completion frees the entry; younger entries of the same ID move up
        if (cmp_hit) begin
          if (IX_W'(i) == cix) vld[i] <= 1'b0;
          else if (vld[i] && id[i] == id[cix] && irank[i] != '0) irank[i] <= irank[i] - 1'b1;
        end
        if (do_alloc && IX_W'(i) == fix) begin
          vld[i]   <= 1'b1;
          ddone[i] <= !IS_WRITE;
          id[i]    <= a_id;
          irank[i] <= n_same_id;
          drank[i] <= IS_WRITE ? n_receiving : '0;
          cur[i]   <= a_addr;
          start[i] <= a_addr;
          len[i]   <= a_len;
          size[i]  <= a_size;
          burst[i] <= a_burst;
          ts[i]    <= now;
        end
      end
    end
  end

endmodule
