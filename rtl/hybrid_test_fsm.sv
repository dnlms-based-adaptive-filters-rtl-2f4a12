// hybrid_test_fsm - controller that runs the filter over a stored signal.
//
// The controller waits in IDLE with the filter held in reset. A rising edge
// of `start` sends it to RUN, where it reads sample addresses 0 .. NUM-1
// from the x/d sample memory, one per clock. The memory answers one clock
// later and the filter registers the samples on the following edge, so the
// filter outputs for address k are written to the result memory at address
// k two clocks after the read (wr_en / wr_addr are the read enable and
// address delayed by two registers). After the last read the controller
// waits in DRAIN until the last write is done, raises `done` and returns to
// IDLE. `busy` is high from the start edge until then; `done` stays high
// until the next start. The filter reset `filt_rst` is a registered copy of
// "state is IDLE": the filter leaves reset on the edge at which the first
// samples arrive from memory. `rst_n` (synchronous, active low) returns the
// controller to IDLE. The IDLE/RUN structure, holding the filter in reset
// while idle and stopping after NUM samples follow the original test
// set-up; the start edge detection, the DRAIN state and the address
// alignment are this design's choices.
module hybrid_test_fsm #(
  parameter int unsigned NUM = 11212,
  parameter int unsigned AW  = $clog2(NUM)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          filt_rst,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output logic          busy,
  output logic          done
);
  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_t;

  state_t        state;
  logic          start_q;
  logic [1:0]    wr_en_p;
  logic [AW-1:0] wr_addr_p [2];

  assign rd_en   = (state == RUN);
  assign wr_en   = wr_en_p[1];
  assign wr_addr = wr_addr_p[1];
  assign busy    = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      start_q  <= 1'b1;
      rd_addr  <= '0;
      filt_rst <= 1'b1;
      done     <= 1'b0;
      wr_en_p  <= '0;
      wr_addr_p[0] <= '0;
      wr_addr_p[1] <= '0;
    end else begin
      start_q  <= start;
      filt_rst <= (state == IDLE);
      wr_en_p  <= {wr_en_p[0], rd_en};
      wr_addr_p[0] <= rd_addr;
      wr_addr_p[1] <= wr_addr_p[0];
      unique case (state)
        IDLE: begin
          rd_addr <= '0;
          if (start && !start_q) begin
            state <= RUN;
            done  <= 1'b0;
          end
        end
        RUN: begin
          if (rd_addr == AW'(NUM - 1)) state <= DRAIN;
          else                         rd_addr <= rd_addr + 1'b1;
        end
        DRAIN: begin
          if (!wr_en_p[0] && !wr_en_p[1]) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // the result memory is written only with addresses that were read
  a_wr_addr_range: assert property (@(posedge clk) disable iff (!rst_n)
                                    wr_en |-> wr_addr < AW'(NUM));
  // no write is left behind when the controller reports completion
  a_done_clean: assert property (@(posedge clk) disable iff (!rst_n)
                                 (done && state == IDLE) |-> !wr_en);
endmodule
