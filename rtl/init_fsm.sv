// init_fsm -- Init SFSMD of the EmulCore: loads the process parameters.
//
// After the Start event the Init machine reads P_LEN parameter words from
// consecutive memory locations PARAM_BASE, PARAM_BASE+1, ... over the
// DSP56600-protocol bus and stores them in the local parameter registers that
// feed the computing behaviours.  One word takes the states of the Init state
// graph:
//   S1  /MCS low, address driven          (MCS && A=&x)
//   S2  /RD low                           (read begins; WAIT_CYCLES extra)
//   S3a I/O register loads D              (Load_I/Oreg)
//   S3b I/O register copied to local y[n], n and local address advance
//   S4  /RD high                          (read stopped)
//   S5  /MCS high                         (memory disabled)
//   S6  n < P_LEN: next word (S1), n = P_LEN: I_End, `done` (R_complete)
// The address stays driven from S1 to S5.  With a 10 ns clock /RD is low for
// 30 ns and the data word is sampled 30 ns after the address and 20 ns after
// /RD fell, inside the SRAM's 12 ns / 6 ns access times and above the
// DSP56600's 17 ns read pulse.  A word takes 7 + WAIT_CYCLES cycles.
//
// Interface: `start` is a one-cycle request, `done` a one-cycle pulse after
// the last word; `params` holds the words until the next load.  `rdata` is the
// value on the data bus.  The machine only reads, so its write-data pins,
// data enable and /WR stay idle.  Reset is active-low, synchronous.
// The state sequence follows the design's Init graph; splitting S3 into two
// cycles, the wait-state parameter and the address map are this design's.
module init_fsm
  import emul_pkg::*;
#(
  parameter int unsigned P_LEN       = 8,        // parameter words (r_LENG)
  parameter addr_t       PARAM_BASE  = 16'h0000, // address of the first word
  parameter int unsigned WAIT_CYCLES = 0         // extra /RD-low cycles
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  data_t    rdata,
  output bus_req_t bus,
  output data_t    params [P_LEN],
  output logic     busy,
  output logic     done
);

  typedef enum logic [3:0] {
    I_START, S1, S2, S3A, S3B, S4, S5, S6, I_END
  } state_e;

  localparam int unsigned NW = $clog2(P_LEN + 1);
  localparam int unsigned IW = (P_LEN > 1) ? $clog2(P_LEN) : 1;
  localparam int unsigned WW = $clog2(WAIT_CYCLES + 2);

  state_e        state;
  logic [NW-1:0] n;      // words read so far
  logic [WW-1:0] wait_q;
  data_t         ioreg;  // I/O register between bus and local memory
  addr_t         maddr;  // memory address of the current word (&x)

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= I_START;
      n      <= '0;
      wait_q <= '0;
      ioreg  <= '0;
      maddr  <= PARAM_BASE;
      for (int i = 0; i < int'(P_LEN); i++) params[i] <= '0;
    end else begin
      unique case (state)
        I_START: begin
          n     <= '0;
          maddr <= PARAM_BASE;
          if (start) state <= S1;
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
          ioreg <= rdata;
          state <= S3B;
        end
        S3B: begin
          params[n[IW-1:0]] <= ioreg;
          n         <= n + 1'b1;
          state     <= S4;
        end
        S4:      state <= S5;
        S5:      state <= S6;
        S6: begin
          maddr <= maddr + 1'b1;
          state <= (int'(n) < int'(P_LEN)) ? S1 : I_END;
        end
        I_END:   state <= I_START;
        default: state <= I_START;
      endcase
    end
  end

  always_comb begin
    bus   = BUS_IDLE;
    busy  = (state != I_START);
    done  = (state == I_END);
    if (state inside {S1, S2, S3A, S3B, S4, S5}) bus.a = maddr;
    if (state inside {S1, S2, S3A, S3B, S4}) bus.mcs_n = 1'b0;
    if (state inside {S2, S3A, S3B})         bus.rd_n  = 1'b0;
  end

  initial assert (P_LEN >= 1) else $error("init_fsm: P_LEN must be at least 1");

endmodule
