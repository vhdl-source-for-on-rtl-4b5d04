// tb_ibus_fo_action: self-checking test of the fiber output sequencer.
//
// The test bench toggles fiber_clk every clk cycle, as the top does, and models
// the transmitter: at each rising edge of fiber_clk with fo_ENA_l low it takes
// the 10-bit symbol on fo_d. Every word must produce exactly two symbols, the
// low byte then the high byte, both with the command and violation flags clear;
// fo_ack must rise before the word is done and fall when the sequencer is idle
// again; a word must take at most six clk cycles from fo_req to idle.
module tb_ibus_fo_action;
  import tout_pkg::*;

  logic clk = 0, reset, fiber_clk;
  logic fo_req, fo_ack, fo_ENA_l;
  word_t data;
  logic [FO_W-1:0] fo_d;
  logic [FO_W-1:0] sym[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk or posedge reset)
    if (reset) fiber_clk <= 1'b0; else fiber_clk <= ~fiber_clk;

  // Transmitter model: fiber_clk is about to rise when it is low at a clk edge.
  always @(posedge clk) if (!reset && !fiber_clk && !fo_ENA_l) sym.push_back(fo_d);

  ibus_fo_action dut (.clk(clk), .reset(reset), .fo_req(fo_req), .fo_ack(fo_ack),
    .data(data), .fiber_clk(fiber_clk), .fo_d(fo_d), .fo_ENA_l(fo_ENA_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    reset = 1; fo_req = 0; data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (4) @(posedge clk);
    check(sym.size() == 0 && fo_ENA_l == 1, "silent while idle");
    for (int i = 0; i < 40; i++) begin
      word_t w;
      w = 16'($urandom);
      // Vary the phase of fo_req against fiber_clk.
      repeat ($urandom % 3) @(posedge clk);
      @(negedge clk) data = w; fo_req = 1;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!fo_ack && cyc < 20);
      check(fo_ack, "fo_ack raised");
      fo_req = 0;
      while (fo_ack && cyc < 20) begin @(posedge clk); #1; cyc++; end
      check(cyc <= 7, $sformatf("word took %0d cycles", cyc));
      check(fo_ENA_l == 1, "enable high when idle");
      repeat (2) @(posedge clk);
      check(sym.size() == 2, $sformatf("%0d symbols for one word", sym.size()));
      if (sym.size() == 2) begin
        check(sym[0] == {2'b00, w[7:0]}, $sformatf("first symbol %h for %h", sym[0], w));
        check(sym[1] == {2'b00, w[15:8]}, $sformatf("second symbol %h for %h", sym[1], w));
      end
      sym.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
