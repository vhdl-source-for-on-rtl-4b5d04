// read_from_fi: decodes words arriving from the fiber and puts them on the
// lower half of the on-board bus.
//
// ibus_fi_port offers each received word with a one-cycle req pulse and holds
// it on `data`. IDLE copies the word to il_io when req is seen. AM_I_ADDRESSED
// then inspects it:
//  * Data word (bit 15 clear): forwarded (HS_FOR_DATA).
//  * Address word whose remote/local bit equals i_am_remote: every address word
//    first clears the control flag and the "addressed" flag. If its chip field
//    equals my_ctrl_address it opens a control transaction: it is consumed
//    here, bit 5 of the sub-address pulses request_reset (soft reset of the
//    receive FIFO), and it and the data words that follow it are acknowledged
//    but not forwarded until the next address word. If the chip field equals
//    my_data_address the sub-address is latched on `address`. In both cases,
//    and for any other chip field, the word then goes through HS_FOR_DATA.
//  * Address word for the other side (remote bit differs): the block returns to
//    IDLE without acknowledging; the sender gives up after its own timeout and
//    the word is dropped.
// HS_FOR_DATA pulses ack to the sender and, unless a control transaction is
// open, raises il_req early; INTERNAL_ACK1 holds il_req until the bus slave
// answers il_ack, INTERNAL_ACK2 waits for il_ack to fall. USE_CTRL_DATA is the
// place where a chip would act on control data; this chip has none to act on.
// Every wait has a timeout of 2**TIMEOUT_W cycles back to IDLE.
//
// fi_i_am_addressed is set by an address word that matches this chip (either
// chip address) and cleared by any other address word, as the design's prose
// describes; it is a status output and does not gate forwarding. This chip's
// receive direction is always enabled and loopback is held off, so
// receive_enabled is 1 and loopback_state is 0 out of reset.
//
// The decode, the forwarding of matching address words and of words for other
// chips, and the dropping of words for the other side follow the source
// design's state machine as written. The reset values are this design's choice.
module read_from_fi
  import tout_pkg::*;
#(
  parameter int unsigned TIMEOUT_W = 4
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       req,
  output logic       ack,
  input  word_t      data,
  output word_t      il_io,
  output byte_t      address,
  output logic       il_req,
  input  logic       il_ack,
  input  logic       i_am_remote,
  input  logic [3:0] my_data_address,
  input  logic [3:0] my_ctrl_address,
  output logic       loopback_state,
  output logic       request_reset,
  output logic       fi_i_am_addressed,
  output logic       receive_enabled
);

  typedef enum logic [2:0] {
    IDLE, AM_I_ADDRESSED, HS_FOR_DATA, USE_CTRL_DATA, INTERNAL_ACK1, INTERNAL_ACK2
  } state_t;

  state_t               state;
  logic [TIMEOUT_W-1:0] timeout;
  logic                 ctrl_transaction;
  addr_word_t           aw;
  localparam logic [TIMEOUT_W-1:0] TMAX = '1;

  assign aw = addr_word_t'(data);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state             <= IDLE;
      timeout           <= '0;
      ctrl_transaction  <= 1'b0;
      fi_i_am_addressed <= 1'b0;
      ack               <= 1'b0;
      il_req            <= 1'b0;
      il_io             <= '0;
      address           <= '0;
      request_reset     <= 1'b0;
      receive_enabled   <= 1'b0;
      loopback_state    <= 1'b0;
    end else begin
      ack             <= 1'b0;
      il_req          <= 1'b0;
      request_reset   <= 1'b0;
      receive_enabled <= 1'b1;  // this side is always enabled
      loopback_state  <= 1'b0;  // loopback disabled in this chip
      unique case (state)
        IDLE: begin
          if (req) begin
            il_io   <= data;
            state   <= AM_I_ADDRESSED;
            timeout <= '0;
          end
        end
        AM_I_ADDRESSED: begin
          state <= IDLE;
          if (aw.is_address) begin
            fi_i_am_addressed <= 1'b0;
            ctrl_transaction  <= 1'b0;
            if (aw.remote == i_am_remote) begin
              if (aw.chip == my_ctrl_address) begin
                ctrl_transaction  <= 1'b1;
                fi_i_am_addressed <= 1'b1;
                request_reset     <= aw.sub[CTRL_RESET_BIT];
                address           <= aw.sub;
              end else if (aw.chip == my_data_address) begin
                fi_i_am_addressed <= 1'b1;
                address           <= aw.sub;
              end
              state <= HS_FOR_DATA;
            end
          end else begin
            state <= HS_FOR_DATA;
          end
        end
        HS_FOR_DATA: begin
          ack <= 1'b1;
          if (!req) begin
            if (ctrl_transaction) begin
              state <= USE_CTRL_DATA;
            end else begin
              state   <= INTERNAL_ACK1;
              timeout <= '0;
            end
          end else if (timeout == TMAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
          if (!ctrl_transaction) il_req <= 1'b1;  // jump start on the bus transfer
        end
        USE_CTRL_DATA: state <= IDLE;
        INTERNAL_ACK1: begin
          il_req <= 1'b1;
          if (il_ack) begin
            timeout <= '0;
            il_req  <= 1'b0;
            state   <= INTERNAL_ACK2;
          end else if (timeout == TMAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        INTERNAL_ACK2: begin
          if (!il_ack || timeout == TMAX) begin
            state <= IDLE;
          end else begin
            timeout <= timeout + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A soft reset request only comes with a control transaction, and the
  // acknowledge to the sender is a single-cycle pulse.
  a_reset_in_ctrl: assert property (@(posedge clk) disable iff (reset)
    request_reset |-> ctrl_transaction);
  a_ack_pulse: assert property (@(posedge clk) disable iff (reset) ack |=> !ack);

endmodule
