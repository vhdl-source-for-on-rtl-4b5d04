// fifo_data_pump: reads bytes from the external receive FIFO and assembles
// them into 16-bit words.
//
// The FIFO is an asynchronous part with an active-low read strobe: its output
// fifo_OUT shows the oldest byte while fifo_READ_l is low and the FIFO moves to
// the next byte when the strobe rises. fifo_EMPTY_l is low when it is empty.
//
// IDLE waits until the word buffer may be refilled (refill_ibus_output_buf,
// or fifo_reset_l high, which is the normal case) and then, to give the FIFO
// time to settle, always passes through WAIT_ON_EMPTY, which waits for data.
// FIFO_STROBE drives fifo_READ_l low for one cycle; FIFO_READ_DATA samples the
// byte as the strobe rises again:
//  * A command symbol (bit 8 set) is discarded and the byte count restarts, so
//    a command symbol realigns the byte pairing.
//  * A data byte is shifted into the top of fiber_to_ibus_buf while the
//    previous top byte moves to the bottom; the first byte of a pair thus ends
//    in bits 7:0 and the second in bits 15:8 (low byte first, as sent).
//  * After the second data byte data_pump_word_ready pulses for one cycle and
//    the pump returns to IDLE; after the first it fetches the next byte.
// A word takes at least six cycles. The buffer is overwritten by the next word,
// whether or not ibus_fi_port has taken the last one.
//
// The state machine, the byte order and the skipping of command symbols follow
// the source design; the reset values of the buffer and counter are this
// design's choice.
module fifo_data_pump
  import tout_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  output word_t             fiber_to_ibus_buf,
  input  logic [FIFO_W-1:0] fifo_OUT,
  output logic              fifo_READ_l,
  output logic              data_pump_word_ready,
  input  logic              refill_ibus_output_buf,
  input  logic              fifo_reset_l,
  input  logic              fifo_EMPTY_l
);

  typedef enum logic [1:0] {IDLE, WAIT_ON_EMPTY, FIFO_STROBE, FIFO_READ_DATA} state_t;

  state_t     state;
  logic [1:0] count;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                <= IDLE;
      count                <= '0;
      fiber_to_ibus_buf    <= '0;
      fifo_READ_l          <= 1'b1;
      data_pump_word_ready <= 1'b0;
    end else begin
      data_pump_word_ready <= 1'b0;
      fifo_READ_l          <= 1'b1;
      unique case (state)
        IDLE: begin
          count <= '0;
          if (fifo_reset_l || refill_ibus_output_buf) state <= WAIT_ON_EMPTY;
        end
        WAIT_ON_EMPTY: begin
          if (fifo_EMPTY_l) state <= FIFO_STROBE;
        end
        FIFO_STROBE: begin
          if (!fifo_EMPTY_l) begin
            state <= WAIT_ON_EMPTY;
          end else begin
            fifo_READ_l <= 1'b0;
            state       <= FIFO_READ_DATA;
          end
        end
        FIFO_READ_DATA: begin
          if (fifo_OUT[SC_BIT]) begin
            count <= '0;
            state <= FIFO_STROBE;
          end else begin
            fiber_to_ibus_buf <= {fifo_OUT[BYTE_W-1:0], fiber_to_ibus_buf[WORD_W-1:BYTE_W]};
            if (count == 2'd1) begin
              data_pump_word_ready <= 1'b1;
              state                <= IDLE;
            end else begin
              count <= count + 1'b1;
              state <= fifo_EMPTY_l ? FIFO_STROBE : WAIT_ON_EMPTY;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The read strobe is only driven low after the FIFO was seen non-empty.
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (reset)
    $fell(fifo_READ_l) |-> $past(fifo_EMPTY_l));

endmodule
