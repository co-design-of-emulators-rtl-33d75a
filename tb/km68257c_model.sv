// km68257c_model -- behavioural model of the shared static RAM (not RTL).
//
// A KM68257C-style asynchronous CMOS SRAM with common data in/out lines,
// widened to the 24-bit system data bus (three 8-bit devices side by side).
// It is sampled on the system clock, so all times are whole CLK_NS periods.
// Read: while /CS and /OE are low and /WE is high, `q` shows the addressed
// word once the address has been stable for 12 ns and /OE low for 6 ns;
// before that it shows the inverted word, so a master that samples too early
// reads wrong data.  Write: the word is stored when /WE rises (or /CS rises
// with /WE low), provided /WE was low for 9 ns and the data was driven and
// stable for the last 7 ns; the address must not move while /CS is low.
// Every breach of these times counts in `violations`.  The times are the
// device's printed read and write access figures.
module km68257c_model
  import emul_pkg::*;
#(
  parameter int unsigned AW     = 15,  // A0..A14: 32K words
  parameter int unsigned CLK_NS = 10
) (
  input  logic     clk,
  input  bus_req_t pins,
  output data_t    q,
  output int       violations,
  output int       reads,
  output int       writes
);

  localparam int unsigned T_AA = 12, T_OE = 6, T_WP = 9, T_DW = 7;

  data_t          mem [2**AW];
  logic [AW-1:0]  addr;
  logic [AW-1:0]  a_q;
  logic           cs_q, oe_q, we_q;
  int             a_run_q, oe_run_q, we_run_q, d_run_q;
  int             a_run, oe_run, d_run;
  data_t          d_q;

  assign addr = pins.a[AW-1:0];

  // consecutive cycles, including this one, with the same address under /CS
  always_comb begin
    a_run  = (!pins.mcs_n && cs_q && addr == a_q) ? a_run_q + 1 : (!pins.mcs_n ? 1 : 0);
    oe_run = (!pins.rd_n) ? oe_run_q + 1 : 0;
    d_run  = (pins.d_oe && d_q == pins.d) ? d_run_q + 1 : (pins.d_oe ? 1 : 0);
  end

  always_comb begin
    q = mem[addr];
    if (!(a_run * CLK_NS >= T_AA && oe_run * CLK_NS >= T_OE)) q = ~mem[addr];
  end

  initial begin
    violations = 0; reads = 0; writes = 0;
    cs_q = 1'b0; oe_q = 1'b0; we_q = 1'b0; a_q = '0; d_q = '0;
    a_run_q = 0; oe_run_q = 0; we_run_q = 0; d_run_q = 0;
  end

  always @(posedge clk) begin
    // end of this cycle: remember it
    if (cs_q && !pins.mcs_n && addr != a_q) violations <= violations + 1;
    if (!pins.mcs_n && !pins.rd_n && !pins.wr_n) violations <= violations + 1;
    if (!pins.wr_n && !pins.mcs_n) begin
      we_run_q <= we_run_q + 1;
    end else if (we_q) begin
      // /WE or /CS rose at the end of the previous cycle: commit the write
      writes <= writes + 1;
      mem[a_q] <= d_q;
      if (we_run_q * CLK_NS < T_WP || d_run_q * CLK_NS < T_DW)
        violations <= violations + 1;
      we_run_q <= 0;
    end
    if (oe_q && (pins.rd_n || pins.mcs_n)) reads <= reads + 1;
    cs_q     <= !pins.mcs_n;
    oe_q     <= !pins.rd_n && !pins.mcs_n;
    we_q     <= !pins.wr_n && !pins.mcs_n;
    a_q      <= addr;
    a_run_q  <= a_run;
    oe_run_q <= oe_run;
    d_run_q  <= d_run;
    d_q      <= pins.d;
  end

endmodule
