// tb_read_from_ibus: self-checking test of the upper-bus reader.
//
// A bus-master task writes words with a four-phase iu_req/iu_ack handshake;
// a responder stands in for the fiber output sequencer and answers req with
// ack after a few cycles, recording the word it was offered. Checked: every
// word arrives once and unchanged; iu_ack rises one cycle after iu_req; a
// master that holds iu_req too long is released by the 16-cycle timeout and
// the word is still sent; a missing responder makes the reader give up after
// its 16-cycle timeout and accept the next word.
module tb_read_from_ibus;
  import tout_pkg::*;

  logic clk = 0, reset;
  logic iu_req, iu_ack, req, ack;
  word_t iu_io, data;
  int checks = 0, failures = 0;
  bit responder_on = 1;
  word_t got[$];

  always #5 clk = ~clk;

  read_from_ibus dut (.clk(clk), .reset(reset), .iu_req(iu_req), .iu_ack(iu_ack),
    .iu_io(iu_io), .data(data), .req(req), .ack(ack));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Responder: ack two cycles after req, held for four cycles (like the
  // fiber output sequencer, which keeps ack until it has sent both bytes).
  initial begin
    ack = 0;
    forever begin
      @(posedge clk);
      if (responder_on && req && !ack) begin
        got.push_back(data);
        repeat (2) @(posedge clk);
        ack <= 1;
        repeat (4) @(posedge clk);
        ack <= 0;
      end
    end
  end

  task automatic write_word(input word_t w, input int hold);
    int n;
    @(negedge clk);
    iu_io = w; iu_req = 1;
    @(posedge clk); #1;
    check(iu_ack == 1, "iu_ack one cycle after iu_req");
    n = 0;
    while (iu_ack && n < hold) begin @(posedge clk); #1; n++; end
    @(negedge clk) iu_req = 0; iu_io = '0;
    repeat (12) @(posedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t sent[$];
    int cyc;
    reset = 1; iu_req = 0; iu_io = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // Normal words.
    for (int i = 0; i < 8; i++) begin
      word_t w;
      w = 16'($urandom);
      sent.push_back(w);
      write_word(w, 1);
    end
    check(got.size() == sent.size(), $sformatf("%0d words sent, %0d expected", got.size(), sent.size()));
    while (got.size() > 0 && sent.size() > 0) begin
      word_t a, b;
      a = got.pop_front(); b = sent.pop_front();
      check(a == b, $sformatf("word %h expected %h", a, b));
    end
    got.delete();
    // Master holds iu_req: iu_ack must fall by the timeout. The word is
    // offered at least once; while iu_req is held the reader keeps req high,
    // so a fast responder may be offered it again.
    @(negedge clk) iu_io = 16'hBEEF; iu_req = 1;
    cyc = 0;
    @(posedge clk); #1;
    while (iu_ack) begin @(posedge clk); #1; cyc++; end
    check(cyc >= 15 && cyc <= 18, $sformatf("iu_ack held %0d cycles with iu_req stuck", cyc));
    @(negedge clk) iu_req = 0;
    repeat (12) @(posedge clk);
    check(got.size() >= 1, "stuck word offered");
    foreach (got[i]) check(got[i] == 16'hBEEF, "stuck word unchanged");
    got.delete();
    // No responder: req must drop after the timeout and the reader recovers.
    responder_on = 0;
    @(negedge clk) iu_io = 16'h1111; iu_req = 1;
    @(posedge clk); @(negedge clk) iu_req = 0;
    cyc = 0;
    while (!req) @(posedge clk);
    while (req && cyc < 40) begin @(posedge clk); #1; cyc++; end
    check(!req && cyc >= 16 && cyc <= 20, $sformatf("req dropped after %0d cycles without ack", cyc));
    responder_on = 1;
    repeat (3) @(posedge clk);
    write_word(16'h2222, 1);
    check(got.size() == 1 && got[0] == 16'h2222, "recovered after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
