// daq_fsm_tb: self-checking, directed test of the acquisition controller.
//
// The test drives the controller's inputs cycle by cycle and checks the
// state and every output after each clock edge:
//   init waits for both reset-busy flags; idle waits for ADC-ready; ready
//   ignores a rising trigger edge and starts on a falling one; acquire holds
//   the FIFO write enable and ends on a rising edge or on FIFO full; the
//   transmit loop reads one word (re for one cycle), sends its high then low
//   byte (tx_dv one cycle on entry to each send state, byte select matching),
//   waits for transmit-done each time, loops while the FIFO has data and
//   returns to idle when it is empty; an empty FIFO after acquisition makes
//   the controller wait SETTLE_CYCLES and return to idle, while data that
//   arrives within that time is sent.
module daq_fsm_tb;
  import fsi_daq_pkg::*;

  localparam int unsigned SETTLE = 16;

  logic        clk = 1'b0;
  logic        rst;
  logic        rrb, wrb, adcr, tf, tr, fif, fie, utxd;
  logic        we, re, tx_dv;
  byte_sel_e   byte_sel;
  daq_state_e  state;
  int unsigned checks = 0, failures = 0;

  daq_fsm #(.SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst, .rrb, .wrb, .adcr, .tf, .tr, .fif, .fie, .utxd,
    .we, .re, .tx_dv, .byte_sel, .state);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check state and outputs; outputs re is combinational, sampled here
  // with the inputs as they are now.
  task automatic expect_st(string what, daq_state_e s, logic e_we, logic e_re, logic e_dv);
    checks++;
    if (state !== s || we !== e_we || re !== e_re || tx_dv !== e_dv) begin
      failures++;
      $display("FAIL %s: state=%0d we=%b re=%b tx_dv=%b, expected state=%0d we=%b re=%b tx_dv=%b",
               what, state, we, re, tx_dv, s, e_we, e_re, e_dv);
    end
  endtask

  task automatic expect_sel(string what, byte_sel_e s);
    checks++;
    if (byte_sel !== s) begin
      failures++;
      $display("FAIL %s: byte_sel=%0d", what, byte_sel);
    end
  endtask

  // Advance one clock; inputs set before the call are seen by that edge.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic pulse_tf(); tf = 1'b1; tick(); tf = 1'b0; endtask
  task automatic pulse_tr(); tr = 1'b1; tick(); tr = 1'b0; endtask

  // One word: TX_IDLE reads, then HB and LB are sent.
  task automatic send_word(logic empty_after);
    expect_st("tx idle reads", ST_TX_IDLE, 0, 1, 0);
    tick();
    expect_st("send HB entry pulse", ST_SEND_HB, 0, 0, 1);
    expect_sel("HB selected", SEL_HB);
    tick();
    expect_st("send HB waits", ST_SEND_HB, 0, 0, 0);
    repeat (5) tick();
    expect_st("send HB still waits", ST_SEND_HB, 0, 0, 0);
    utxd = 1'b1; tick(); utxd = 1'b0;
    expect_st("send LB entry pulse", ST_SEND_LB, 0, 0, 1);
    expect_sel("LB selected", SEL_LB);
    repeat (4) tick();
    expect_st("send LB waits", ST_SEND_LB, 0, 0, 0);
    fie = empty_after;
    utxd = 1'b1; tick(); utxd = 1'b0;
  endtask

  initial begin
    rst = 1'b1;
    {rrb, wrb} = 2'b11;
    {adcr, tf, tr, fif, fie, utxd} = 6'b0000_10;
    repeat (2) tick();
    rst = 1'b0;
    tick();
    expect_st("init while both busy", ST_INIT, 0, 0, 0);
    rrb = 1'b0;
    tick();
    expect_st("init while write side busy", ST_INIT, 0, 0, 0);
    rrb = 1'b1; wrb = 1'b0;
    tick();
    expect_st("init while read side busy", ST_INIT, 0, 0, 0);
    rrb = 1'b0;
    tick();
    expect_st("idle after reset busy clears", ST_IDLE, 0, 0, 0);
    repeat (5) tick();
    expect_st("idle until ADC ready", ST_IDLE, 0, 0, 0);
    adcr = 1'b1;
    tick();
    expect_st("ready after ADC ready", ST_READY, 0, 0, 0);
    pulse_tr();
    expect_st("rising edge does not start", ST_READY, 0, 0, 0);
    repeat (3) tick();
    pulse_tf();
    expect_st("acquire on falling edge", ST_ACQUIRE, 1, 0, 0);
    repeat (10) tick();
    expect_st("acquire holds write enable", ST_ACQUIRE, 1, 0, 0);
    fie = 1'b0;
    pulse_tr();
    // Three words, then empty.
    send_word(1'b0);
    send_word(1'b0);
    send_word(1'b1);
    expect_st("idle when FIFO empty", ST_IDLE, 0, 0, 0);
    tick();
    expect_st("ready again", ST_READY, 0, 0, 0);

    // Acquisition ended by FIFO full.
    pulse_tf();
    expect_st("acquire 2", ST_ACQUIRE, 1, 0, 0);
    fie = 1'b0;
    repeat (3) tick();
    fif = 1'b1; tick(); fif = 1'b0;
    send_word(1'b1);
    expect_st("idle after full-terminated run", ST_IDLE, 0, 0, 0);
    tick();

    // Empty after acquisition: wait, then give up.
    pulse_tf();
    fie = 1'b1;
    pulse_tr();
    expect_st("tx idle waits on empty FIFO", ST_TX_IDLE, 0, 0, 0);
    repeat (SETTLE - 1) tick();
    expect_st("still waiting before timeout", ST_TX_IDLE, 0, 0, 0);
    repeat (2) tick();
    expect_st("idle after settle timeout", ST_IDLE, 0, 0, 0);
    tick();

    // Late data within the settle time is sent.
    pulse_tf();
    pulse_tr();
    repeat (5) tick();
    expect_st("waiting for late word", ST_TX_IDLE, 0, 0, 0);
    fie = 1'b0;
    #0;
    send_word(1'b1);
    expect_st("idle after late word", ST_IDLE, 0, 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
