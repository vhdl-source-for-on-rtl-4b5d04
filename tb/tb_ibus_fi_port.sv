// tb_ibus_fi_port: self-checking test of the port between the FIFO data pump
// and the fiber-input reader.
//
// The test bench pulses data_pump_word_ready with a word in the buffer and
// plays the reader: it answers each req pulse with a one-cycle ack a few
// cycles later. Checked: each word is offered once with a one-cycle req pulse
// carrying the buffer contents; refill_ibus_output_buf is low for exactly one
// cycle after each completed handshake and high otherwise; a word-ready pulse
// while a handshake is under way is not taken; without an ack the port gives
// up after its 16-cycle timeout and takes the next word.
module tb_ibus_fi_port;
  import tout_pkg::*;

  logic clk = 0, reset;
  word_t data, buf_w;
  logic req, ack, ready, refill;
  int checks = 0, failures = 0;
  bit responder_on = 1;
  word_t got[$];
  int refill_lows = 0;
  int req_len = 0;

  always #5 clk = ~clk;

  ibus_fi_port dut (.clk(clk), .reset(reset), .data(data), .req(req), .ack(ack),
    .fiber_to_ibus_buf(buf_w), .data_pump_word_ready(ready),
    .refill_ibus_output_buf(refill));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    ack = 0;
    forever begin
      @(posedge clk);
      if (responder_on && req) begin
        got.push_back(data);
        repeat (2) @(posedge clk);
        ack <= 1;
        @(posedge clk);
        ack <= 0;
      end
    end
  end

  always @(posedge clk) if (!reset) begin
    if (req) req_len++;
    else begin
      if (req_len != 0) check(req_len == 1, $sformatf("req pulse %0d cycles", req_len));
      req_len = 0;
    end
  end

  task automatic offer(input word_t w);
    @(negedge clk) buf_w = w; ready = 1;
    @(negedge clk) ready = 0; buf_w = ~w;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lows;
    reset = 1; ready = 0; buf_w = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (2) @(posedge clk); #1;
    check(refill == 1, "refill high when idle");
    for (int i = 0; i < 10; i++) begin
      word_t w;
      w = 16'($urandom);
      offer(w);
      lows = 0;
      repeat (10) begin @(posedge clk); #1; if (!refill) lows++; end
      check(lows == 1, $sformatf("refill low %0d cycles", lows));
      check(got.size() == 1 && got[0] == w, $sformatf("word %h offered", w));
      got.delete();
    end
    // A second word while busy is not taken.
    offer(16'hAAAA);
    offer(16'h5555);
    repeat (12) @(posedge clk);
    check(got.size() == 1 && got[0] == 16'hAAAA, "word while busy ignored");
    got.delete();
    // No reader: req pulses once, the port times out, then recovers.
    responder_on = 0;
    offer(16'h1357);
    repeat (10) @(posedge clk);
    offer(16'h2468);  // still waiting for ack: ignored
    repeat (12) @(posedge clk);
    responder_on = 1;
    offer(16'h9ABC);
    repeat (12) @(posedge clk);
    check(got.size() == 1 && got[0] == 16'h9ABC, "recovered after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
