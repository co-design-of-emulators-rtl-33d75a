// storage_fsm -- Storage SFSMD of the EmulCore: writes the results table.
//
// At every storage event (`store`, one per storage period Ts) the machine
// takes a local copy y of the E_LEN result variables and writes it into the
// next E_LEN memory locations over the DSP56600-protocol bus.  The memory
// address only ever increments, so successive records fill a table that
// starts at RESULT_BASE; `clr` (start of an emulation) rewinds it.  After
// N_RECORDS records `full` is set and further events are ignored.
// One word follows the states of the Storage state graph:
//   S1  /MCS low, address driven          (MCS && A=&x)
//   S2  /WR low                           (write begins; WAIT_CYCLES extra)
//   S3a I/O register loads y[n]           (load_I/Oreg)
//   S3b I/O register drives D, n advances (En_I/Oreg)
//   S4  /WR high, D still driven          (write stopped)
//   S5  /MCS high                         (memory disabled)
//   S6  n < E_LEN: S7 (next address) then S1; n = E_LEN: S_End
//   S_End  record complete (`done`, S_complete), address advances
// With a 10 ns clock /WR is low for 30 ns and the data is on the bus 10 ns
// before /WR rises, above the SRAM's 9 ns write pulse and 7 ns data set-up
// and the DSP56600's 19.3 ns / 8.8 ns.  A word takes 8 + WAIT_CYCLES cycles
// (7 for the last one of a record, plus S_End).
//
// A storage event that arrives while a record is still being written is held
// (one deep) and served right after it; `overrun` flags an event lost because
// one was already held.  These rules, the record snapshot, the address map and
// the wait-state parameter are this design's choices; the state sequence is
// the design's Storage graph.  Reset is active-low, synchronous.
module storage_fsm
  import emul_pkg::*;
#(
  parameter int unsigned E_LEN       = 8,        // result words per record
  parameter addr_t       RESULT_BASE = 16'h0010, // first word of the table
  parameter int unsigned N_RECORDS   = 1024,     // records in the table
  parameter int unsigned WAIT_CYCLES = 0         // extra /WR-low cycles
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clr,                 // rewind the table
  input  logic     store,               // storage event (Ts)
  input  data_t    results [E_LEN],     // emulator outputs E_i
  output bus_req_t bus,
  output logic     busy,
  output logic     done,                // record written
  output logic     full,                // N_RECORDS records written
  output logic     overrun,             // storage event lost
  output logic [$clog2(N_RECORDS+1)-1:0] records
);

  typedef enum logic [3:0] {
    S_START, S1, S2, S3A, S3B, S4, S5, S6, S7, S_END
  } state_e;

  localparam int unsigned NW = $clog2(E_LEN + 1);
  localparam int unsigned IW = (E_LEN > 1) ? $clog2(E_LEN) : 1;
  localparam int unsigned WW = $clog2(WAIT_CYCLES + 2);

  state_e        state;
  logic [NW-1:0] n;
  logic [WW-1:0] wait_q;
  data_t         y [E_LEN];   // local copy of the results
  data_t         ioreg;
  addr_t         maddr;
  logic          pending;
  logic          start_rec;

  assign full      = (int'(records) == int'(N_RECORDS));
  assign start_rec = (state == S_START) && !full && (store || pending);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      state   <= S_START;
      n       <= '0;
      wait_q  <= '0;
      ioreg   <= '0;
      maddr   <= RESULT_BASE;
      pending <= 1'b0;
      overrun <= 1'b0;
      records <= '0;
      for (int i = 0; i < int'(E_LEN); i++) y[i] <= '0;
    end else begin
      overrun <= 1'b0;
      if (start_rec) begin
        pending <= pending && store;     // one event taken, the other held
      end else if (store && !full) begin
        overrun <= pending;              // a held event is already waiting
        pending <= 1'b1;
      end
      unique case (state)
        S_START: begin
          n <= '0;
          if (start_rec) begin
            y     <= results;
            state <= S1;
          end
        end
        S1: begin
          wait_q <= '0;
          state  <= S2;
        end
        S2: begin
          if (int'(wait_q) == int'(WAIT_CYCLES)) state <= S3A;
          else wait_q <= wait_q + 1'b1;
        end
        S3A: begin
          ioreg <= y[n[IW-1:0]];
          state <= S3B;
        end
        S3B: begin
          n     <= n + 1'b1;
          state <= S4;
        end
        S4:      state <= S5;
        S5:      state <= S6;
        S6:      state <= (int'(n) < int'(E_LEN)) ? S7 : S_END;
        S7: begin
          maddr <= maddr + 1'b1;
          state <= S1;
        end
        S_END: begin
          maddr   <= maddr + 1'b1;
          records <= records + 1'b1;
          state   <= S_START;
        end
        default: state <= S_START;
      endcase
    end
  end

  always_comb begin
    bus  = BUS_IDLE;
    busy = (state != S_START);
    done = (state == S_END);
    if (state inside {S1, S2, S3A, S3B, S4, S5}) bus.a     = maddr;
    if (state inside {S1, S2, S3A, S3B, S4})     bus.mcs_n = 1'b0;
    if (state inside {S2, S3A, S3B})             bus.wr_n  = 1'b0;
    if (state inside {S3B, S4}) begin
      bus.d    = ioreg;
      bus.d_oe = 1'b1;
    end
  end

  initial assert (E_LEN >= 1 && N_RECORDS >= 1)
    else $error("storage_fsm: E_LEN and N_RECORDS must be at least 1");

endmodule
