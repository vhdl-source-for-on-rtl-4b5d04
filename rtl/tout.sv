// tout: on-board bus (ibus) to fiber-link interface chip, top level.
//
// The chip joins the two 16-bit halves of a board's on-board bus to a pair of
// fiber transceivers (a serialising transmitter and a deserialising receiver,
// both separate parts) and an external 9-bit receive FIFO.
//
// Transmit direction: a word written by the bus master on the upper half
// (id_upper, AO_TO_PC_STROBE/AO_TO_PC_ACK) is taken by read_from_ibus and sent
// by ibus_fo_action to the transmitter as two bytes, low byte first. The
// transmitter's byte clock fo_CKW is clk divided by two (a flip-flop that
// toggles every cycle); the same clock is the receiver's reference clock
// fr_ref_clk.
//
// Receive direction: fiber_rec passes each received byte and its ready strobe
// straight into the external FIFO and manages the FIFO reset. fifo_data_pump
// reads the FIFO, drops command symbols and pairs data bytes into words;
// ibus_fi_port offers each word to read_from_fi, which decodes address words
// against this chip's fixed addresses and drives the word onto the lower half
// (id_lower, AO_FROM_PC_STROBE/AO_FROM_PC_ACK). A control-address word with
// bit 5 set clears the receive FIFO (soft reset).
//
// Ports: the source's bidirectional 32-bit bus is used here only as an input
// on bits 31:16 and an output on bits 15:0, so it is split into id_upper and
// id_lower. The transceiver mode pins are tied as in the source (fr_mode,
// fo_mode, fo_foto low, fr_rf and fo_ENN_l high); DEBUG mirrors
// AO_FROM_PC_STROBE. The inputs fast, slow, in_strobe, fr_ckr, fo_RF_l,
// fifo_FULL_l and fifo_HALF_l belong to the board's pinout and are not used by
// the logic. chip_selected, violation_count and rx_byte_strobe are status
// outputs added by this design so that those registers are observable.
//
// Parameters: the chip's remote/local select and its data and control chip
// addresses are fixed in the source (remote, 4'b1111, 4'b0010); they are
// parameters here. TIMEOUT_W sets every handshake timeout (16 cycles).
module tout
  import tout_pkg::*;
#(
  parameter logic       I_AM_REMOTE     = 1'b1,
  parameter logic [3:0] MY_DATA_ADDRESS = 4'b1111,
  parameter logic [3:0] MY_CTRL_ADDRESS = 4'b0010,
  parameter int unsigned TIMEOUT_W      = 4
) (
  input  logic              clk,
  input  logic              fast,
  input  logic              slow,
  output logic              DEBUG,
  // on-board bus
  input  word_t             id_upper,
  output word_t             id_lower,
  input  logic              reset,
  output logic              AO_FROM_PC_STROBE,
  input  logic              AO_FROM_PC_ACK,
  input  logic              AO_TO_PC_STROBE,
  output logic              AO_TO_PC_ACK,
  input  logic              in_strobe,
  // fiber receiver
  input  logic [FR_W-1:0]   fr_d,
  output logic              fr_ref_clk,
  output logic              fr_rf,
  output logic              fr_mode,
  input  logic              fr_status,
  input  logic              fr_RDY_l,
  input  logic              fr_ckr,
  // fiber transmitter
  output logic [FO_W-1:0]   fo_d,
  output logic              fo_ENN_l,
  output logic              fo_ENA_l,
  output logic              fo_CKW,
  output logic              fo_mode,
  output logic              fo_foto,
  input  logic              fo_RF_l,
  // external receive FIFO
  output logic              fifo_reset_l,
  output logic              fifo_WRITE_l,
  output logic [FIFO_W-1:0] fifo_D,
  output logic              fifo_READ_l,
  input  logic              fifo_FULL_l,
  input  logic              fifo_HALF_l,
  input  logic              fifo_EMPTY_l,
  input  logic [FIFO_W-1:0] fifo_OUT,
  // status
  output logic              chip_selected,
  output logic [7:0]        violation_count,
  output logic              rx_byte_strobe
);

  logic  fo_data_strobe;
  logic  write_to_FO_req, write_to_FO_ack;
  word_t data_to_FO;
  logic  FI_to_ibus_req, FI_to_ibus_ack;
  word_t FI_data;
  byte_t address_from_pc;
  logic  reset_fifo;
  logic  rec_enabled;
  logic  loopback_state;
  logic  data_pump_word_ready;
  logic  refill_ibus_output_buf;
  word_t fiber_to_ibus_buf;

  // Transmitter byte clock and receiver reference: clk / 2.
  always_ff @(posedge clk or posedge reset) begin
    if (reset) fo_data_strobe <= 1'b0;
    else       fo_data_strobe <= ~fo_data_strobe;
  end

  assign fo_CKW     = fo_data_strobe;
  assign fr_ref_clk = fo_data_strobe;
  assign fo_mode    = 1'b0;
  assign fo_foto    = 1'b0;
  assign fo_ENN_l   = 1'b1;
  assign fr_mode    = 1'b0;
  assign fr_rf      = 1'b1;
  assign DEBUG      = AO_FROM_PC_STROBE;

  read_from_ibus #(.TIMEOUT_W(TIMEOUT_W)) ibus_reader (
    .clk    (clk),
    .reset  (reset),
    .iu_req (AO_TO_PC_STROBE),
    .iu_ack (AO_TO_PC_ACK),
    .iu_io  (id_upper),
    .data   (data_to_FO),
    .req    (write_to_FO_req),
    .ack    (write_to_FO_ack)
  );

  ibus_fo_action ibus_fo (
    .clk       (clk),
    .reset     (reset),
    .fo_req    (write_to_FO_req),
    .fo_ack    (write_to_FO_ack),
    .data      (data_to_FO),
    .fiber_clk (fo_CKW),
    .fo_d      (fo_d),
    .fo_ENA_l  (fo_ENA_l)
  );

  read_from_fi #(.TIMEOUT_W(TIMEOUT_W)) fi_reader (
    .clk               (clk),
    .reset             (reset),
    .req               (FI_to_ibus_req),
    .ack               (FI_to_ibus_ack),
    .data              (FI_data),
    .il_io             (id_lower),
    .address           (address_from_pc),
    .il_req            (AO_FROM_PC_STROBE),
    .il_ack            (AO_FROM_PC_ACK),
    .i_am_remote       (I_AM_REMOTE),
    .my_data_address   (MY_DATA_ADDRESS),
    .my_ctrl_address   (MY_CTRL_ADDRESS),
    .loopback_state    (loopback_state),
    .request_reset     (reset_fifo),
    .fi_i_am_addressed (chip_selected),
    .receive_enabled   (rec_enabled)
  );

  ibus_fi_port #(.TIMEOUT_W(TIMEOUT_W)) ibus_fi (
    .clk                    (clk),
    .reset                  (reset),
    .data                   (FI_data),
    .req                    (FI_to_ibus_req),
    .ack                    (FI_to_ibus_ack),
    .fiber_to_ibus_buf      (fiber_to_ibus_buf),
    .data_pump_word_ready   (data_pump_word_ready),
    .refill_ibus_output_buf (refill_ibus_output_buf)
  );

  fiber_rec fr_imp (
    .clk                  (clk),
    .reset                (reset),
    .fr_d                 (fr_d),
    .fr_RDY_l             (fr_RDY_l),
    .fr_status            (fr_status),
    .receive_enabled      (rec_enabled),
    .increment_fifo_count (rx_byte_strobe),
    .violation_count      (violation_count),
    .fifo_reset_l         (fifo_reset_l),
    .fifo_D               (fifo_D),
    .fifo_WRITE_l         (fifo_WRITE_l),
    .reset_fifo_request   (reset_fifo)
  );

  fifo_data_pump pump (
    .clk                    (clk),
    .reset                  (reset),
    .fiber_to_ibus_buf      (fiber_to_ibus_buf),
    .fifo_OUT               (fifo_OUT),
    .fifo_READ_l            (fifo_READ_l),
    .data_pump_word_ready   (data_pump_word_ready),
    .refill_ibus_output_buf (refill_ibus_output_buf),
    .fifo_reset_l           (fifo_reset_l),
    .fifo_EMPTY_l           (fifo_EMPTY_l)
  );

endmodule
