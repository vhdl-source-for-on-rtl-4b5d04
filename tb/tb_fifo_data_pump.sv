// tb_fifo_data_pump: self-checking test of fifo_data_pump with a FIFO model.
//
// Bytes are written into the FIFO model, some of them command symbols (bit 8
// set). The expected words are built independently: data bytes are paired in
// arrival order, the first of a pair in bits 7:0, and a command symbol
// discards a half-built pair. Each word_ready pulse must carry the next
// expected word and be exactly one cycle long; the shortest time from a
// non-empty FIFO to word_ready is six cycles; fifo_READ_l must never fall
// while the FIFO is empty.
module tb_fifo_data_pump;
  import tout_pkg::*;

  logic clk = 0;
  logic reset;
  word_t buf_w;
  logic [8:0] fifo_out, fifo_d;
  logic read_l, ready, refill, fifo_reset_l, empty_l, half_l, full_l, write_l;

  int checks = 0, failures = 0;
  word_t expected[$];
  logic [7:0] pend;
  logic have_pend;

  always #5 clk = ~clk;

  ext_fifo_model #(.DEPTH(64)) fifo (
    .reset_l(fifo_reset_l), .write_l(write_l), .read_l(read_l), .d(fifo_d),
    .q(fifo_out), .empty_l(empty_l), .half_l(half_l), .full_l(full_l));

  fifo_data_pump dut (
    .clk(clk), .reset(reset), .fiber_to_ibus_buf(buf_w), .fifo_OUT(fifo_out),
    .fifo_READ_l(read_l), .data_pump_word_ready(ready),
    .refill_ibus_output_buf(refill), .fifo_reset_l(fifo_reset_l),
    .fifo_EMPTY_l(empty_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference pairing of the byte stream.
  task automatic push(input logic [8:0] sym);
    @(negedge clk);
    fifo_d  = sym;
    write_l = 1'b0;
    #2 write_l = 1'b1;
    if (sym[8]) have_pend = 1'b0;
    else if (!have_pend) begin
      pend = sym[7:0];
      have_pend = 1'b1;
    end else begin
      expected.push_back({sym[7:0], pend});
      have_pend = 1'b0;
    end
  endtask

  int words_seen = 0;
  bit prev_ready = 0;
  always @(posedge clk) begin
    if (!reset) begin
      if (ready) begin
        check(!prev_ready, "word_ready one cycle long");
        check(expected.size() > 0, "word expected");
        if (expected.size() > 0) begin
          word_t e;
          e = expected.pop_front();
          check(buf_w == e, $sformatf("word %h expected %h", buf_w, e));
        end
        words_seen++;
      end
      prev_ready <= ready;
    end
  end

  // The read strobe may only fall when the FIFO holds data.
  always @(negedge read_l) check(empty_l == 1'b1, "no read of an empty FIFO");

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat;
    have_pend = 0;
    reset = 1; refill = 0; fifo_reset_l = 0; write_l = 1; fifo_d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0; fifo_reset_l = 1; refill = 1;
    repeat (5) @(posedge clk);
    check(ready == 0 && read_l == 1, "idle with empty FIFO");
    // Latency of one word from a FIFO holding two bytes.
    @(negedge clk);
    fifo_d = 9'h034; write_l = 0; #1 write_l = 1; #1;
    fifo_d = 9'h012; write_l = 0; #1 write_l = 1;
    expected.push_back(16'h1234);
    t0 = int'($time);
    wait (ready);
    lat = (int'($time) - t0 + 5) / 10;
    check(lat >= 4 && lat <= 7, $sformatf("latency %0d cycles", lat));
    repeat (3) @(posedge clk);
    // Byte stream with command symbols that realign the pairing.
    push(9'h0AA); push(9'h0BB);
    push(9'h011); push(9'h1BC); push(9'h022); push(9'h033);
    push(9'h1BC); push(9'h1BC); push(9'h044); push(9'h055);
    for (int i = 0; i < 40; i++) push({1'b0, 8'($urandom)});
    for (int i = 0; i < 20; i++) push({($urandom % 4) == 0, 8'($urandom)});
    repeat (300) @(posedge clk);
    check(expected.size() == 0, $sformatf("%0d words never delivered", expected.size()));
    check(words_seen >= 25, "enough words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
