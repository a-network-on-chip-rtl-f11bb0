// axi_traffic_gen: AXI4 traffic source and reference model for the monitor
// testbenches (not synthesizable).
//
// Drives both sides of an AXI4 link (the monitor only listens): random
// read and write bursts with random IDs, lengths, sizes and burst types
// (FIXED, INCR, WRAP), random ready back-pressure (valid held until ready),
// read data interleaved across IDs and write responses out of order across
// IDs, in order within an ID, AXI4 write data in address order. At most
// `max_out` transactions per direction are outstanding.
//
// For every cycle it also gives what a monitor should see in that cycle:
// the slave-side address and ID of the W and R beats being handed over, and
// for a completing transaction its start address and latency (cycles from
// the address handshake). Beat addresses are computed here with the AXI
// formulas (aligned start plus beat times size, wrapped at the wrap
// boundary), independently of the RTL. Outputs change at the falling edge;
// handshakes happen at the rising edge.
module axi_traffic_gen #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned ID_W   = 4,
  parameter int unsigned N_IDS  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,          // start new transactions
  input  int                max_out,
  output logic              awvalid, awready,
  output logic [ID_W-1:0]   awid,
  output logic [ADDR_W-1:0] awaddr,
  output logic [7:0]        awlen,
  output logic [2:0]        awsize,
  output logic [1:0]        awburst,
  output logic              wvalid, wready,
  output logic [DATA_W-1:0] wdata,
  output logic              wlast,
  output logic              bvalid, bready,
  output logic [ID_W-1:0]   bid,
  output logic              arvalid, arready,
  output logic [ID_W-1:0]   arid,
  output logic [ADDR_W-1:0] araddr,
  output logic [7:0]        arlen,
  output logic [2:0]        arsize,
  output logic [1:0]        arburst,
  output logic              rvalid, rready,
  output logic [ID_W-1:0]   rid,
  output logic [DATA_W-1:0] rdata,
  output logic              rlast,
  // what the monitor should report this cycle
  output logic [ADDR_W-1:0] exp_wd_addr,
  output logic [ID_W-1:0]   exp_wd_id,
  output logic [ADDR_W-1:0] exp_rd_addr,
  output logic [ADDR_W-1:0] exp_wc_addr,
  output int                exp_wc_lat,
  output logic [ADDR_W-1:0] exp_rc_addr,
  output int                exp_rc_lat,
  output int                outstanding  // reads + writes not yet complete
);

  typedef struct {
    int unsigned id, len, size, burst, addr;
    int          issue;       // cycle of the address handshake, -1 before
    int unsigned beat;        // next data beat
    bit          ddone;       // all write data handed over
  } trans_t;

  trans_t rq[$], wq[$];       // in order of creation
  int cycle = 0;
  int ar_i = -1, aw_i = -1, r_i = -1, b_i = -1, w_i = -1;

  localparam int unsigned MAX_SIZE = $clog2(DATA_W / 8);

  function automatic int unsigned beat_addr(trans_t t, int unsigned n);
    int unsigned bytes, aligned, wrap, lower;
    bytes   = 1 << t.size;
    aligned = (t.addr / bytes) * bytes;
    if (t.burst == 0) return t.addr;
    if (t.burst == 2) begin
      wrap  = bytes * (t.len + 1);
      lower = (t.addr / wrap) * wrap;
      return lower + ((t.addr - lower) + n * bytes) % wrap;
    end
    return (n == 0) ? t.addr : aligned + n * bytes;
  endfunction

  function automatic trans_t new_trans();
    trans_t t;
    int unsigned lens[4] = '{1, 3, 7, 15};
    t.id    = $urandom_range(0, N_IDS - 1);
    t.burst = $urandom_range(0, 2);
    t.size  = $urandom_range(0, MAX_SIZE);
    t.len   = (t.burst == 2) ? lens[$urandom_range(0, 3)] : $urandom_range(0, 7);
    t.addr  = 32'h1000 * $urandom_range(0, 3) + $urandom_range(0, 255);
    if (t.burst == 2) t.addr = t.addr & ~((1 << t.size) - 1);
    t.issue = -1;
    t.beat  = 0;
    t.ddone = 0;
    return t;
  endfunction

  // oldest accepted transaction of its ID
  function automatic bit first_of_id(ref trans_t q[$], input int k);
    for (int j = 0; j < k; j++) if (q[j].id == q[k].id) return 0;
    return 1;
  endfunction

  function automatic logic [DATA_W-1:0] rnd_data();
    logic [DATA_W-1:0] d;
    for (int i = 0; i < int'(DATA_W); i += 32) d[i +: 32] = $urandom;
    d[7:0] = 8'($urandom_range(0, 3));   // low byte from a small set so data filters hit
    return d;
  endfunction

  function automatic int n_open(ref trans_t q[$]);
    return q.size();
  endfunction

  always_comb outstanding = rq.size() + wq.size();

  initial begin
    {awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready} = '0;
    {awid, awaddr, awlen, awsize, awburst, wdata, wlast, bid} = '0;
    {arid, araddr, arlen, arsize, arburst, rid, rdata, rlast} = '0;
    {exp_wd_addr, exp_wd_id, exp_rd_addr, exp_wc_addr, exp_rc_addr} = '0;
    exp_wc_lat = 0; exp_rc_lat = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      // ---------------- choose what is presented this cycle
      // AR
      if (ar_i < 0 && en && rq.size() < max_out && $urandom_range(0, 2) == 0) begin
        rq.push_back(new_trans()); ar_i = rq.size() - 1;
      end
      arvalid = (ar_i >= 0); arready = arvalid && $urandom_range(0, 3) != 0;
      if (ar_i >= 0) begin
        arid = ID_W'(rq[ar_i].id); araddr = ADDR_W'(rq[ar_i].addr); arlen = 8'(rq[ar_i].len);
        arsize = 3'(rq[ar_i].size); arburst = 2'(rq[ar_i].burst);
      end
      // AW
      if (aw_i < 0 && en && wq.size() < max_out && $urandom_range(0, 2) == 0) begin
        wq.push_back(new_trans()); aw_i = wq.size() - 1;
      end
      awvalid = (aw_i >= 0); awready = awvalid && $urandom_range(0, 3) != 0;
      if (aw_i >= 0) begin
        awid = ID_W'(wq[aw_i].id); awaddr = ADDR_W'(wq[aw_i].addr); awlen = 8'(wq[aw_i].len);
        awsize = 3'(wq[aw_i].size); awburst = 2'(wq[aw_i].burst);
      end
      // R: a random accepted read that is the oldest of its ID
      if (r_i < 0 && $urandom_range(0, 1) == 0) begin
        int cand[$];
        cand.delete();
        for (int k = 0; k < rq.size(); k++)
          if (rq[k].issue >= 0 && first_of_id(rq, k)) cand.push_back(k);
        if (cand.size() > 0) r_i = cand[$urandom_range(0, cand.size() - 1)];
        if (r_i >= 0) rdata = rnd_data();
      end
      rvalid = (r_i >= 0); rready = rvalid && $urandom_range(0, 3) != 0;
      if (r_i >= 0) begin
        rid = ID_W'(rq[r_i].id); rlast = (rq[r_i].beat == rq[r_i].len);
        exp_rd_addr = ADDR_W'(beat_addr(rq[r_i], rq[r_i].beat));
        exp_rc_addr = ADDR_W'(rq[r_i].addr); exp_rc_lat = cycle - rq[r_i].issue;
      end
      // W: the oldest accepted write whose data is not complete
      if (w_i < 0) begin
        for (int k = 0; k < wq.size(); k++)
          if (!wq[k].ddone) begin
            if (wq[k].issue >= 0 && $urandom_range(0, 1) == 0) begin w_i = k; wdata = rnd_data(); end
            break;
          end
      end
      wvalid = (w_i >= 0); wready = wvalid && $urandom_range(0, 3) != 0;
      if (w_i >= 0) begin
        wlast = (wq[w_i].beat == wq[w_i].len);
        exp_wd_addr = ADDR_W'(beat_addr(wq[w_i], wq[w_i].beat)); exp_wd_id = ID_W'(wq[w_i].id);
      end
      // B: a random write with all data, oldest of its ID
      if (b_i < 0 && $urandom_range(0, 1) == 0) begin
        int cand[$];
        cand.delete();
        for (int k = 0; k < wq.size(); k++)
          if (wq[k].ddone && first_of_id(wq, k)) cand.push_back(k);
        if (cand.size() > 0) b_i = cand[$urandom_range(0, cand.size() - 1)];
      end
      bvalid = (b_i >= 0); bready = bvalid && $urandom_range(0, 3) != 0;
      if (b_i >= 0) begin
        bid = ID_W'(wq[b_i].id);
        exp_wc_addr = ADDR_W'(wq[b_i].addr); exp_wc_lat = cycle - wq[b_i].issue;
      end
      // ---------------- handshakes at the rising edge
      @(posedge clk);
      cycle++;
      if (arvalid && arready) begin rq[ar_i].issue = cycle - 1; ar_i = -1; end
      if (awvalid && awready) begin wq[aw_i].issue = cycle - 1; aw_i = -1; end
      if (wvalid && wready) begin
        if (wlast) wq[w_i].ddone = 1; else wq[w_i].beat++;
        w_i = -1;
      end
      if (rvalid && rready) begin
        if (rlast) begin
          rq.delete(r_i);
          if (ar_i > r_i) ar_i--;
        end else rq[r_i].beat++;
        r_i = -1;
      end
      if (bvalid && bready) begin
        wq.delete(b_i);
        if (aw_i > b_i) aw_i--;
        if (w_i > b_i) w_i--;
        b_i = -1;
      end else if (b_i >= 0) begin
        // keep presenting the same response
      end
    end
  end

  // indices of held (not yet accepted) items must follow deletions
  // (handled above for the channels whose index can move)

endmodule
