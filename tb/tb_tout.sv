// tb_tout: end-to-end test of the whole interface chip, at its default
// parameters (remote side, data address 4'hF, control address 4'h2).
//
// The fiber is looped back: symbols the chip hands to the transmitter (taken at
// each rising edge of fo_CKW with fo_ENA_l low) are queued and delivered by a
// receiver model, one per two clk cycles at most, on fr_d with a one-cycle
// active-low ready strobe that switches on the falling clk edge. The receive
// FIFO is the behavioural model ext_fifo_model. A master writes words on the
// upper bus; a slave on the lower bus collects what the chip forwards.
//
// The expected lower-bus traffic is computed from the sent words by a small
// reference decoder written from the address-word rules: data words are
// forwarded unless a control transaction is open; an address word for this
// side opens a control transaction if its chip field is the control address
// (and is then not forwarded) and is forwarded otherwise; an address word for
// the other side is dropped. Words sent while the receiver reports a bad link
// are lost, since the FIFO is then held in reset.
//
// The run makes each mechanism happen and counts it: link-down loss, data and
// address forwarding, chip selection, control transactions, the soft FIFO
// reset, dropped addresses for the other side, command symbols on the fiber
// (skipped by the data pump), code violations (counted) and a back-to-back
// burst of data words at the fastest rate the upper bus allows, and the loss of
// a word that arrives while the receive side waits out a timeout. A mechanism that
// never happened counts as a failure.
module tb_tout;
  import tout_pkg::*;

  logic clk = 0, reset;
  word_t id_upper, id_lower;
  logic debug, from_strobe, from_ack, to_strobe, to_ack;
  logic [FR_W-1:0] fr_d;
  logic fr_ref_clk, fr_rf, fr_mode, fr_status, fr_RDY_l;
  logic [FO_W-1:0] fo_d;
  logic fo_ENN_l, fo_ENA_l, fo_CKW, fo_mode, fo_foto;
  logic fifo_reset_l, fifo_WRITE_l, fifo_READ_l, fifo_FULL_l, fifo_HALF_l, fifo_EMPTY_l;
  logic [FIFO_W-1:0] fifo_D, fifo_OUT;
  logic chip_selected, rx_byte;
  logic [7:0] vcount;

  int checks = 0, failures = 0;
  logic [FO_W-1:0] link[$];
  word_t got[$];
  word_t expected[$];
  bit ref_ctrl = 0;

  // Mechanism counters.
  int n_link_down_lost = 0, n_forwarded = 0, n_selected = 0, n_ctrl = 0;
  int n_soft_reset = 0, n_dropped = 0, n_command_sym = 0, n_violation = 0;
  int n_burst = 0, t_burst, n_timeout_loss = 0;

  always #5 clk = ~clk;

  tout dut (
    .clk(clk), .fast(1'b0), .slow(1'b0), .DEBUG(debug),
    .id_upper(id_upper), .id_lower(id_lower), .reset(reset),
    .AO_FROM_PC_STROBE(from_strobe), .AO_FROM_PC_ACK(from_ack),
    .AO_TO_PC_STROBE(to_strobe), .AO_TO_PC_ACK(to_ack), .in_strobe(1'b0),
    .fr_d(fr_d), .fr_ref_clk(fr_ref_clk), .fr_rf(fr_rf), .fr_mode(fr_mode),
    .fr_status(fr_status), .fr_RDY_l(fr_RDY_l), .fr_ckr(1'b0),
    .fo_d(fo_d), .fo_ENN_l(fo_ENN_l), .fo_ENA_l(fo_ENA_l), .fo_CKW(fo_CKW),
    .fo_mode(fo_mode), .fo_foto(fo_foto), .fo_RF_l(1'b1),
    .fifo_reset_l(fifo_reset_l), .fifo_WRITE_l(fifo_WRITE_l), .fifo_D(fifo_D),
    .fifo_READ_l(fifo_READ_l), .fifo_FULL_l(fifo_FULL_l), .fifo_HALF_l(fifo_HALF_l),
    .fifo_EMPTY_l(fifo_EMPTY_l), .fifo_OUT(fifo_OUT),
    .chip_selected(chip_selected), .violation_count(vcount), .rx_byte_strobe(rx_byte));

  ext_fifo_model fifo (
    .reset_l(fifo_reset_l), .write_l(fifo_WRITE_l), .read_l(fifo_READ_l),
    .d(fifo_D), .q(fifo_OUT), .empty_l(fifo_EMPTY_l), .half_l(fifo_HALF_l),
    .full_l(fifo_FULL_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Transmitter: fo_CKW low at a clk edge means it rises now.
  always @(posedge clk) if (!reset && !fo_CKW && !fo_ENA_l) link.push_back(fo_d);

  // Receiver: delivers queued symbols with a one-cycle ready strobe.
  initial begin
    fr_d = '0; fr_RDY_l = 1;
    forever begin
      @(negedge clk);
      if (link.size() > 0) begin
        logic [FO_W-1:0] s;
        s = link.pop_front();
        fr_d = {2'b00, s[9], s[8], s[7:0]};
        fr_RDY_l = 0;
        @(negedge clk) fr_RDY_l = 1;
      end
    end
  end

  // Lower-bus slave.
  always @(posedge clk) begin
    if (reset) from_ack <= 0;
    else if (from_strobe && !from_ack) begin
      from_ack <= 1;
      got.push_back(id_lower);
    end else if (!from_strobe) from_ack <= 0;
  end

  // Soft FIFO resets seen on the FIFO pins.
  always @(negedge fifo_reset_l) if (!reset) n_soft_reset++;

  // Reference decoder for one word that crosses a good link.
  function automatic void reference(input word_t w);
    addr_word_t a;
    a = addr_word_t'(w);
    if (a.is_address) begin
      if (a.remote == 1'b1) begin
        ref_ctrl = (a.chip == 4'h2);
        if (ref_ctrl) n_ctrl++;
        else expected.push_back(w);
      end else begin
        ref_ctrl = 0;
        n_dropped++;
      end
    end else if (!ref_ctrl) expected.push_back(w);
  endfunction

  // Upper-bus master: one four-phase write, then a pause.
  task automatic write_upper(input word_t w, input int gap);
    @(negedge clk) id_upper = w; to_strobe = 1;
    while (!to_ack) @(posedge clk);
    @(negedge clk) to_strobe = 0;
    while (to_ack) @(posedge clk);
    repeat (gap) @(posedge clk);
  endtask

  task automatic send(input word_t w);
    reference(w);
    write_upper(w, 30);
  endtask

  task automatic inject(input logic [FO_W-1:0] s);
    @(negedge clk) link.push_back(s);
    repeat (6) @(posedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel_before;
    reset = 1; id_upper = '0; to_strobe = 0; fr_status = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (4) @(posedge clk);
    check(fifo_reset_l == 0, "FIFO held in reset after power-up");
    check(fo_ENN_l == 1 && fr_rf == 1 && fo_mode == 0 && fr_mode == 0 && fo_foto == 0,
          "transceiver mode pins");
    // Link down: the words are lost.
    write_upper(16'h0F0F, 30);
    write_upper(16'h1111, 30);
    n_link_down_lost = 2;
    check(got.size() == 0 && fifo_reset_l == 0, "link down: nothing received");
    @(negedge clk) fr_status = 1;
    // Plain data.
    for (int i = 0; i < 20; i++) send({1'b0, 15'($urandom)});
    // Select this chip's data address, then data.
    send(16'h9F10);
    check(chip_selected == 1, "chip selected by its data address");
    if (chip_selected) n_selected++;
    for (int i = 0; i < 5; i++) send({1'b0, 15'($urandom)});
    // Command symbols and a code violation on the fiber between words.
    inject({2'b01, 8'hBC});
    inject({2'b01, 8'hBC});
    inject({2'b11, 8'hFF});
    n_command_sym = 3;
    send(16'h0ACE);
    check(vcount == 1, $sformatf("violation count %0d", vcount));
    n_violation = vcount;
    // Another chip on this side.
    send(16'h9733);
    check(chip_selected == 0, "deselected by another chip's address");
    send(16'h0BAD);
    // Control transaction without and with soft reset.
    send(16'h9201);
    send(16'h00FF);
    sel_before = n_soft_reset;
    send(16'h9220);
    check(n_soft_reset == sel_before + 1, "control bit 5 resets the FIFO");
    check(vcount == 0, "soft reset clears the violation count");
    send(16'h0777);
    send(16'h9F00);
    send(16'h4321);
    // Address for the other side: dropped.
    send(16'h8F00);
    send(16'h0ABC);
    // A data word right behind an address for the other side reaches the
    // port while it still waits out its timeout, and is lost.
    reference(16'h8F00);
    write_upper(16'h8F00, 0);
    write_upper(16'h0D0D, 30);
    n_timeout_loss++;
    send(16'h0E0E);
    // A longer random mix of everything.
    for (int i = 0; i < 60; i++) begin
      word_t w;
      w = 16'($urandom);
      if (w[15]) begin
        case ($urandom % 4)
          0: w[11:8] = 4'h2;
          1: w[11:8] = 4'hF;
          default: ;
        endcase
        w[5] = 1'b0;
      end
      send(w);
    end
    // Back-to-back burst of data words: the master starts each write as soon
    // as the previous one is acknowledged. Open any control transaction first.
    send(16'h9F01);
    t_burst = int'($time);
    for (int i = 0; i < 20; i++) begin
      word_t w;
      w = {1'b0, 15'($urandom)};
      reference(w);
      write_upper(w, 0);
      n_burst++;
    end
    t_burst = (int'($time) - t_burst) / 10;
    $display("burst: %0d words in %0d cycles", n_burst, t_burst);
    repeat (100) @(posedge clk);
    // Compare the lower-bus traffic with the reference.
    n_forwarded = got.size();
    check(got.size() == expected.size(),
          $sformatf("%0d words forwarded, %0d expected", got.size(), expected.size()));
    for (int i = 0; i < got.size() && i < expected.size(); i++)
      check(got[i] == expected[i], $sformatf("word %0d: %h expected %h", i, got[i], expected[i]));
    check(link.size() == 0 && fifo_EMPTY_l == 0, "link and FIFO drained");
    $display("mechanisms: link_down_lost=%0d forwarded=%0d selected=%0d ctrl=%0d soft_reset=%0d dropped=%0d command_sym=%0d violation=%0d",
             n_link_down_lost, n_forwarded, n_selected, n_ctrl, n_soft_reset, n_dropped,
             n_command_sym, n_violation);
    check(n_link_down_lost > 0, "link-down loss exercised");
    check(n_forwarded > 0, "forwarding exercised");
    check(n_selected > 0, "chip selection exercised");
    check(n_ctrl > 0, "control transaction exercised");
    check(n_soft_reset > 0, "soft FIFO reset exercised");
    check(n_dropped > 0, "other-side address exercised");
    check(n_command_sym > 0, "command symbols exercised");
    check(n_violation > 0, "code violation exercised");
    check(n_burst > 0, "back-to-back burst exercised");
    check(n_timeout_loss > 0, "loss during a port timeout exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
