// tb_read_from_fi: self-checking test of the fiber-input word decoder.
//
// The test bench plays ibus_fi_port (a one-cycle req pulse with the word held
// on data, then a wait of up to 18 cycles for ack) and a slave on the lower
// on-board bus (ack one cycle after il_req, released when il_req falls). The
// chip is configured as remote with data address 4'hF and control address
// 4'h2. The expected outcome of each word is written out by hand from the
// decoding rules: data words and address words for this side are forwarded
// unchanged; a control-address word and the data after it are acknowledged but
// not forwarded, and bit 5 of its sub-address pulses request_reset; an address
// word for the other side is never acknowledged. The addressed flag and the
// latched sub-address are checked after each address word, and a slave that
// never answers must not hang the decoder.
module tb_read_from_fi;
  import tout_pkg::*;

  logic clk = 0, reset;
  logic req, ack, il_req, il_ack, loopback, req_reset, addressed, rx_en;
  word_t data, il_io;
  byte_t address;
  int checks = 0, failures = 0;
  bit slave_on = 1;
  word_t got[$];
  int resets = 0;

  always #5 clk = ~clk;

  read_from_fi dut (.clk(clk), .reset(reset), .req(req), .ack(ack), .data(data),
    .il_io(il_io), .address(address), .il_req(il_req), .il_ack(il_ack),
    .i_am_remote(1'b1), .my_data_address(4'hF), .my_ctrl_address(4'h2),
    .loopback_state(loopback), .request_reset(req_reset),
    .fi_i_am_addressed(addressed), .receive_enabled(rx_en));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Lower-bus slave.
  always @(posedge clk) begin
    if (reset) il_ack <= 0;
    else if (slave_on && il_req && !il_ack) begin
      il_ack <= 1;
      got.push_back(il_io);
    end else if (!il_req) il_ack <= 0;
    if (!reset && req_reset) resets++;
  end

  // Offer one word; report whether it was acknowledged.
  task automatic send(input word_t w, output bit acked);
    int n;
    @(negedge clk) data = w; req = 1;
    @(negedge clk) req = 0;
    acked = 0;
    n = 0;
    while (!acked && n < 18) begin @(posedge clk); #1; if (ack) acked = 1; n++; end
    repeat (8) @(posedge clk);
  endtask

  task automatic expect_word(input word_t w, input bit fwd, input bit acked_exp);
    bit a;
    got.delete();
    send(w, a);
    check(a == acked_exp, $sformatf("word %h ack %0b expected %0b", w, a, acked_exp));
    if (fwd) check(got.size() == 1 && got[0] == w, $sformatf("word %h forwarded", w));
    else     check(got.size() == 0, $sformatf("word %h not forwarded", w));
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; req = 0; data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (2) @(posedge clk);
    check(rx_en == 1 && loopback == 0, "receive enabled, loopback off");
    // Data words.
    for (int i = 0; i < 5; i++) expect_word({1'b0, 15'($urandom)}, 1, 1);
    // Address word for this chip's data address (remote bit 12 set, chip F).
    expect_word(16'h9F5A, 1, 1);
    check(addressed == 1 && address == 8'h5A, "data address selects chip");
    expect_word(16'h1234, 1, 1);
    // Address word for another chip on this side: forwarded, not selected.
    expect_word(16'h9733, 1, 1);
    check(addressed == 0 && address == 8'h5A, "other chip deselects");
    // Control transaction without reset.
    expect_word(16'h9201, 0, 1);
    check(addressed == 1 && address == 8'h01 && resets == 0, "control address, no reset");
    expect_word(16'h00FF, 0, 1);   // control data consumed
    // Control transaction with soft reset (bit 5).
    expect_word(16'h9220, 0, 1);
    check(resets == 1, "soft reset pulse");
    expect_word(16'h0777, 0, 1);
    // Back to a data address: forwarding resumes.
    expect_word(16'h9F00, 1, 1);
    expect_word(16'h4321, 1, 1);
    // Address for the other side (remote bit clear): never acknowledged.
    expect_word(16'h8F00, 0, 0);
    check(addressed == 0, "other side deselects");
    expect_word(16'h0ABC, 1, 1);
    // A lower-bus slave that never answers: the decoder times out.
    slave_on = 0;
    expect_word(16'h0DEF, 0, 1);
    repeat (20) @(posedge clk);
    slave_on = 1;
    expect_word(16'h0123, 1, 1);
    check(resets == 1, "one soft reset in all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
