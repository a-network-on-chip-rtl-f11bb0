// bus_filter_tb: self-checking test of the bus transaction filter.
// Random configurations and events; the expected match is worked out here
// from the four criteria (range, data under mask, optional ID, direction)
// and the pass-all rule of a disabled filter. Checks that every criterion
// both passed and rejected events at least once.
module bus_filter_tb;
  logic en, dir_en, id_en, ev_valid, match;
  logic [31:0] addr_lo, addr_hi, ev_addr;
  logic [63:0] ref_data, mask, ev_data;
  logic [3:0]  ref_id, ev_id;
  int checks = 0, failures = 0;
  int rej_range = 0, rej_data = 0, rej_id = 0, rej_dir = 0, hits = 0;
  logic [31:0] bnd [4] = '{32'h0FF, 32'h100, 32'h1FF, 32'h200};
  bit bexp [4] = '{0, 1, 1, 0};

  bus_filter dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp, r_ok, d_ok, i_ok;
    for (int n = 0; n < 5000; n++) begin
      en       = $urandom_range(0, 5) != 0;
      dir_en   = $urandom_range(0, 5) != 0;
      id_en    = $urandom_range(0, 1);
      addr_lo  = $urandom_range(0, 200);
      addr_hi  = addr_lo + $urandom_range(0, 100);
      ev_addr  = $urandom_range(0, 400);
      ref_data = {$urandom, $urandom};
      mask     = 64'hFF << (8 * $urandom_range(0, 7));
      ev_data  = ($urandom_range(0, 1) != 0) ? ref_data ^ (64'h1 << $urandom_range(0, 63)) : ref_data;
      ref_id   = 4'($urandom_range(0, 3));
      ev_id    = 4'($urandom_range(0, 3));
      ev_valid = $urandom_range(0, 7) != 0;
      #1;
      r_ok = ev_addr >= addr_lo && ev_addr <= addr_hi;
      d_ok = ((ev_data ^ ref_data) & mask) == 0;
      i_ok = !id_en || ev_id == ref_id;
      exp  = ev_valid && (!en || (dir_en && r_ok && d_ok && i_ok));
      checks++;
      if (match !== exp) begin
        failures++;
        $display("FAIL n=%0d en=%0b dir=%0b r=%0b d=%0b i=%0b match=%0b", n, en, dir_en, r_ok, d_ok, i_ok, match);
      end
      if (ev_valid && en) begin
        if (!r_ok && dir_en && d_ok && i_ok) rej_range++;
        if (!d_ok && dir_en && r_ok && i_ok) rej_data++;
        if (!i_ok && dir_en && r_ok && d_ok) rej_id++;
        if (!dir_en && r_ok && d_ok && i_ok) rej_dir++;
      end
      if (exp) hits++;
    end
    // directed: both ends of the range are inside, one past either end is not
    en = 1; dir_en = 1; id_en = 0; ev_valid = 1; mask = 0; addr_lo = 32'h100; addr_hi = 32'h1FF;
    foreach (bnd[i]) begin
      ev_addr = bnd[i]; #1;
      checks++;
      if (match !== bexp[i]) begin failures++; $display("FAIL boundary %h", ev_addr); end
    end
    checks++;
    if (!(rej_range > 0 && rej_data > 0 && rej_id > 0 && rej_dir > 0 && hits > 0)) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
