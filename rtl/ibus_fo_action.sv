// ibus_fo_action: sends one 16-bit word to the fiber transmitter as two bytes.
//
// The fiber transmitter takes a 10-bit symbol (8 data bits, bit 8 = command
// symbol flag, bit 9 = send-violation flag) on each rising edge of its byte
// clock fiber_clk while its active-low enable fo_ENA_l is low. fiber_clk is
// produced in the top by toggling a flip-flop every clk cycle, so it has half
// the clk rate, and a rising edge of fiber_clk coincides with a clk edge at
// which fiber_clk is sampled low.
//
// Sequence: FO_IDLE (enable high, both flags 0) waits for fo_req and loads the
// low byte. FO_BYTE1 waits until fiber_clk is sampled high, so that fiber_clk
// falls now and rises at the end of the next cycle, and raises fo_ack.
// FO_WAIT1 holds the low byte with enable low across that rising edge.
// FO_BYTE2 loads the high byte at the next falling edge; FO_WAIT2 holds it with
// enable low across the following rising edge and returns to FO_IDLE, where
// fo_ack drops. The two bytes therefore go out on consecutive fiber_clk rising
// edges, low byte first; a word takes 5 or 6 clk cycles from fo_req.
//
// Interface: fo_req/fo_ack four-phase handshake with read_from_ibus; `data`
// must stay stable until fo_ack falls. The state sequence, the byte order and
// the clock phase rule follow the source design; the reset of the data bus and
// of fo_ack is this design's choice.
module ibus_fo_action
  import tout_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            fo_req,
  output logic            fo_ack,
  input  word_t           data,
  input  logic            fiber_clk,
  output logic [FO_W-1:0] fo_d,
  output logic            fo_ENA_l
);

  typedef enum logic [2:0] {FO_IDLE, FO_BYTE1, FO_WAIT1, FO_BYTE2, FO_WAIT2} state_t;

  state_t state;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state    <= FO_IDLE;
      fo_ENA_l <= 1'b1;
      fo_ack   <= 1'b0;
      fo_d     <= '0;
    end else begin
      fo_ENA_l <= 1'b0;  // enable stays low through both bytes
      unique case (state)
        FO_IDLE: begin
          fo_ENA_l         <= 1'b1;
          fo_d[SC_BIT]     <= 1'b0;  // data symbol
          fo_d[VIOLATION_BIT] <= 1'b0;  // no forced violation
          fo_ack           <= 1'b0;
          if (fo_req) begin
            fo_d[BYTE_W-1:0] <= data[BYTE_W-1:0];
            state            <= FO_BYTE1;
          end
        end
        FO_BYTE1: begin
          if (fiber_clk) begin
            state  <= FO_WAIT1;
            fo_ack <= 1'b1;  // early, so the other side has time to see it
          end
        end
        FO_WAIT1: state <= FO_BYTE2;
        FO_BYTE2: begin
          fo_d[BYTE_W-1:0] <= data[WORD_W-1:BYTE_W];
          state            <= FO_WAIT2;
        end
        FO_WAIT2: begin
          fo_ENA_l <= 1'b1;  // let the enable return high before the next word
          state    <= FO_IDLE;
        end
        default: state <= FO_IDLE;
      endcase
    end
  end

  // The transmitter enable is low only while a word is being sent.
  a_ena_in_word: assert property (@(posedge clk) disable iff (reset)
    !fo_ENA_l |-> state != FO_IDLE);

endmodule
