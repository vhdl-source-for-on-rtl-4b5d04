// fiber_rec: couples the fiber receiver to the external receive FIFO.
//
// The receiver's byte (8 data bits plus the command-symbol flag, fr_d[8:0]) is
// wired straight to the FIFO data inputs, and its active-low ready strobe
// fr_RDY_l straight to the FIFO's active-low write strobe. The pass-through is
// deliberate: the receiver's ready strobe has a 60/40 duty cycle at the byte
// rate, and a strobe regenerated from clk would be shorter than the FIFO's
// minimum write pulse.
//
// The clocked part manages the FIFO reset and watches the strobes:
//  * fifo_reset_l is forced low, asynchronously, by reset or by a soft reset
//    request (reset_fifo_request). It is released at the first clk edge that
//    sees a ready strobe while the receiver reports a good link (fr_status) and
//    reception is enabled, so the FIFO stays empty until the link carries data.
//  * increment_fifo_count pulses for one cycle for each such strobe.
//  * violation_count counts strobed bytes whose code-violation bit fr_d[9] is
//    set; it is cleared by reset and by a soft reset request and wraps at 2**8.
// The two-state machine (IDLE, FIFO_LATCH) counts one byte per strobe as long
// as a strobe is low for at most two clk cycles.
//
// The pass-through, the FIFO reset handling and the state machine follow the
// source design. The byte strobe as a one-cycle pulse and the counting of
// violations are this design's reading of two signals the source declares but
// leaves without a working update.
module fiber_rec
  import tout_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic [FR_W-1:0]   fr_d,
  input  logic              fr_RDY_l,
  input  logic              fr_status,
  input  logic              receive_enabled,
  output logic              increment_fifo_count,
  output logic [7:0]        violation_count,
  output logic              fifo_reset_l,
  output logic [FIFO_W-1:0] fifo_D,
  output logic              fifo_WRITE_l,
  input  logic              reset_fifo_request
);

  typedef enum logic {IDLE, FIFO_LATCH} state_t;

  state_t state;
  logic   fifo_clear;
  logic   byte_seen;

  assign fifo_D       = fr_d[FIFO_W-1:0];
  assign fifo_WRITE_l = fr_RDY_l;
  assign fifo_clear   = reset | reset_fifo_request;
  assign byte_seen    = (state == IDLE) && !reset_fifo_request &&
                        fr_status && receive_enabled && !fr_RDY_l;

  // FIFO reset: asserted asynchronously, released by the first good byte.
  always_ff @(posedge clk or posedge fifo_clear) begin
    if (fifo_clear) fifo_reset_l <= 1'b0;
    else if (byte_seen) fifo_reset_l <= 1'b1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state                <= IDLE;
      increment_fifo_count <= 1'b0;
      violation_count      <= '0;
    end else begin
      increment_fifo_count <= 1'b0;
      if (reset_fifo_request) violation_count <= '0;
      unique case (state)
        IDLE: begin
          if (byte_seen) begin
            state                <= FIFO_LATCH;
            increment_fifo_count <= 1'b1;
            if (fr_d[VIOLATION_BIT]) violation_count <= violation_count + 1'b1;
          end
        end
        FIFO_LATCH: state <= IDLE;
        default:    state <= IDLE;
      endcase
    end
  end

endmodule
