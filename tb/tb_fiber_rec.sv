// tb_fiber_rec: self-checking test of the fiber receiver to FIFO coupling.
//
// The test bench plays the receiver: it presents a 12-bit symbol and drives
// the active-low ready strobe low for one clk cycle, switching on the falling
// clk edge as an asynchronous receiver would. Checked: data and strobe reach
// the FIFO pins unchanged; the FIFO reset stays asserted after reset while the
// link status is bad and is released by the first strobe with good status; one
// increment pulse per strobe; violation_count counts symbols with bit 9 set;
// a soft reset request asserts the FIFO reset at once and clears the count.
module tb_fiber_rec;
  import tout_pkg::*;

  logic clk = 0, reset;
  logic [FR_W-1:0] fr_d;
  logic fr_RDY_l, fr_status, rx_en, inc, fifo_reset_l, fifo_WRITE_l, reset_req;
  logic [7:0] vcount;
  logic [FIFO_W-1:0] fifo_D;
  int checks = 0, failures = 0;
  int incs = 0;

  always #5 clk = ~clk;

  fiber_rec dut (.clk(clk), .reset(reset), .fr_d(fr_d), .fr_RDY_l(fr_RDY_l),
    .fr_status(fr_status), .receive_enabled(rx_en), .increment_fifo_count(inc),
    .violation_count(vcount), .fifo_reset_l(fifo_reset_l), .fifo_D(fifo_D),
    .fifo_WRITE_l(fifo_WRITE_l), .reset_fifo_request(reset_req));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (inc) incs++;

  task automatic symbol(input logic [FR_W-1:0] s);
    @(negedge clk) fr_d = s; fr_RDY_l = 0;
    #1 check(fifo_D == s[8:0] && fifo_WRITE_l == 0, "pass-through to FIFO");
    @(negedge clk) fr_RDY_l = 1;
    #1 check(fifo_WRITE_l == 1, "write strobe released");
    @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, n;
    reset = 1; fr_d = '0; fr_RDY_l = 1; fr_status = 0; rx_en = 1; reset_req = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    check(fifo_reset_l == 0, "FIFO reset after reset");
    // Link down: strobes do not release the FIFO reset and are not counted.
    symbol(12'h011); symbol(12'h022);
    check(fifo_reset_l == 0 && incs == 0, "link down keeps FIFO in reset");
    // Link up: first strobe releases the reset.
    fr_status = 1;
    symbol(12'h033);
    check(fifo_reset_l == 1, "first good byte releases FIFO reset");
    check(incs == 1, "one increment per byte");
    exp_v = 0; n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [FR_W-1:0] s;
      s = 12'($urandom);
      s[11:10] = 2'b00;
      if (s[9]) exp_v++;
      symbol(s);
      n++;
    end
    check(incs == n, $sformatf("%0d increments for %0d bytes", incs, n));
    check(vcount == 8'(exp_v), $sformatf("violation count %0d expected %0d", vcount, exp_v));
    check(exp_v > 0, "violations exercised");
    // Soft reset request.
    @(negedge clk) reset_req = 1;
    #1 check(fifo_reset_l == 0, "soft reset asserts FIFO reset at once");
    @(negedge clk) reset_req = 0;
    @(negedge clk);
    check(vcount == 0 && fifo_reset_l == 0, "soft reset clears count, FIFO held");
    symbol(12'h244);
    check(fifo_reset_l == 1 && vcount == 1, "released again, violation counted");
    // Reception disabled: no release, no count.
    @(negedge clk) reset_req = 1;
    @(negedge clk) reset_req = 0; rx_en = 0;
    n = incs;
    symbol(12'h055);
    check(fifo_reset_l == 0 && incs == n, "disabled reception ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
