// read_from_ibus: upper on-board bus reader feeding the fiber output.
//
// A bus master places a 16-bit word on the upper half of the on-board bus and
// raises iu_req. In IDLE the word is captured into `data` and iu_ack is raised.
// In HS the block keeps iu_ack high and already raises req towards the fiber
// output sequencer, waiting for the master to drop iu_req (or for a timeout of
// 2**TIMEOUT_W cycles). In IU_HS1 it holds req until the sequencer answers
// with ack (timeout: give up and return to IDLE); in IU_HS2 it waits, without
// a timeout, for ack to fall, since the far side is known to be alive.
//
// Interface: iu_req/iu_ack four-phase handshake with the bus master on iu_io;
// req/ack four-phase handshake with ibus_fo_action on `data`, which stays
// stable from capture until the next IDLE capture.
// Timing: iu_ack rises one cycle after iu_req is seen; req rises one cycle later.
// The state machine, the timeouts and their 4-bit length follow the source
// design. The asynchronous reset to IDLE with all outputs low is this design's
// choice (the source leaves the reset branch empty).
module read_from_ibus
  import tout_pkg::*;
#(
  parameter int unsigned TIMEOUT_W = 4
) (
  input  logic  clk,
  input  logic  reset,
  input  logic  iu_req,
  output logic  iu_ack,
  input  word_t iu_io,
  output word_t data,
  output logic  req,
  input  logic  ack
);

  typedef enum logic [1:0] {IDLE, HS, IU_HS1, IU_HS2} state_t;

  state_t               state;
  logic [TIMEOUT_W-1:0] timeout;
  localparam logic [TIMEOUT_W-1:0] TMAX = '1;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state   <= IDLE;
      timeout <= '0;
      iu_ack  <= 1'b0;
      req     <= 1'b0;
      data    <= '0;
    end else begin
      req    <= 1'b0;
      iu_ack <= 1'b0;
      unique case (state)
        IDLE: begin
          if (iu_req) begin
            data    <= iu_io;
            iu_ack  <= 1'b1;
            state   <= HS;
            timeout <= '0;
          end
        end
        HS: begin
          iu_ack <= 1'b1;
          req    <= 1'b1;
          if (!iu_req || timeout == TMAX) begin
            state   <= IU_HS1;
            timeout <= '0;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        IU_HS1: begin
          req <= 1'b1;
          if (ack) begin
            req   <= 1'b0;
            state <= IU_HS2;
          end else if (timeout == TMAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        IU_HS2: begin
          if (!ack) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
