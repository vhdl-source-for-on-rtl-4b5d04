// ibus_fi_port: hands each word assembled from the fiber to read_from_fi.
//
// fifo_data_pump pulses data_pump_word_ready for one cycle when its word
// buffer fiber_to_ibus_buf holds a complete word. If this port is in IDLE and
// ack is low, it copies the buffer to `data` and pulses req for one cycle
// (READ_REQ). It then waits for ack to rise (READ_REQ) and to fall again
// (END_CYCLE), each wait limited to 2**TIMEOUT_W cycles. A word that becomes
// ready while the port is not in IDLE is not taken.
//
// refill_ibus_output_buf tells the pump it may fetch the next word. It is low
// out of reset and for the one cycle after a handshake completes, and high
// otherwise, so the pump runs ahead of this port; the pump's own state machine
// paces the reads from the FIFO.
//
// The states, the one-cycle req pulse, the timeouts and the refill timing
// follow the source design; the reset values are this design's choice.
module ibus_fi_port
  import tout_pkg::*;
#(
  parameter int unsigned TIMEOUT_W = 4
) (
  input  logic  clk,
  input  logic  reset,
  output word_t data,
  output logic  req,
  input  logic  ack,
  input  word_t fiber_to_ibus_buf,
  input  logic  data_pump_word_ready,
  output logic  refill_ibus_output_buf
);

  typedef enum logic [1:0] {IDLE, READ_REQ, END_CYCLE} state_t;

  state_t               state;
  logic [TIMEOUT_W-1:0] timeout;
  localparam logic [TIMEOUT_W-1:0] TMAX = '1;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                  <= IDLE;
      timeout                <= '0;
      data                   <= '0;
      req                    <= 1'b0;
      refill_ibus_output_buf <= 1'b0;
    end else begin
      req                    <= 1'b0;
      refill_ibus_output_buf <= 1'b1;
      unique case (state)
        IDLE: begin
          timeout <= '0;
          if (data_pump_word_ready && !ack) begin
            data  <= fiber_to_ibus_buf;
            req   <= 1'b1;
            state <= READ_REQ;
          end
        end
        READ_REQ: begin
          if (ack) begin
            state <= END_CYCLE;
          end else if (timeout == TMAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        END_CYCLE: begin
          if (!ack) begin
            refill_ibus_output_buf <= 1'b0;
            state                  <= IDLE;
          end else if (timeout == TMAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The offer to read_from_fi is a single-cycle pulse.
  a_req_pulse: assert property (@(posedge clk) disable iff (reset) req |=> !req);

endmodule
