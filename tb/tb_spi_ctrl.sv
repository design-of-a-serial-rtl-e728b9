// tb_spi_ctrl: self-checking test of the SPI control FSM.
//
// The testbench makes its own clock enables (divide by 4: fe every fourth
// cycle, re two cycles after it) and plays the stream source and sink.
// Test 1: a transaction of a READ packet (tfirst, slave 2) followed
// directly by a WRITE packet (tlast). The state seen at every fe tick must be
//   IDLE, MODECFG x2, CSASS x2, CSWAITPRE x2, DATA x16, CSWAITPOST x4,
//   CSDEASS x2, IDLE
// (default CNT_* values), and the strobes to the data path must come in
// the right numbers: one mode_load, cs_set and cs_clr, two loads, 14
// shifts, 16 samples, one rx_store (READ only), one stop, two tnext pulses.
// The READ packet's flags must appear on the input stream.
// Test 2: two READ packets while the sink refuses the first word for 30
// ticks: the FSM must wait in IDLE with the chip select still open and
// start the second packet only after the word is taken.
module tb_spi_ctrl;
  import spi_pkg::*;
  localparam int UW = 3;

  logic clk = 1'b0, rst = 1'b1;
  logic re, fe;
  logic ocpout_tvalid, ocpout_tfirst, ocpout_tlast, ocpout_tnext;
  logic [UW-1:0] ocpout_tuser, ocpin_tuser;
  logic ocpin_tvalid, ocpin_tfirst, ocpin_tlast, ocpin_tnext;
  spi_dp_ctrl_t dp;
  spi_state_e   state;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign fe = !rst && (cyc % 4 == 3);
  assign re = !rst && (cyc % 4 == 1);

  spi_ctrl #(.CSNUM(4)) dut (
    .clk(clk), .rst(rst), .re(re), .fe(fe),
    .ocpout_tvalid(ocpout_tvalid), .ocpout_tfirst(ocpout_tfirst), .ocpout_tlast(ocpout_tlast),
    .ocpout_tuser(ocpout_tuser), .ocpout_tnext(ocpout_tnext),
    .ocpin_tvalid(ocpin_tvalid), .ocpin_tfirst(ocpin_tfirst), .ocpin_tlast(ocpin_tlast),
    .ocpin_tuser(ocpin_tuser), .ocpin_tnext(ocpin_tnext),
    .dp(dp), .state(state)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // strobe counters
  int n_mode, n_set, n_clr, n_load, n_shift, n_sample, n_store, n_stop, n_tnext;
  spi_state_e seen [$];
  bit logging = 0;
  always @(posedge clk) if (!rst) begin
    n_mode   += dp.mode_load; n_set  += dp.cs_set; n_clr   += dp.cs_clr;
    n_load   += dp.load;      n_shift += dp.shift; n_sample += dp.sample;
    n_store  += dp.rx_store;  n_stop += dp.stop;   n_tnext += (ocpout_tnext && ocpout_tvalid);
    if (fe && logging) seen.push_back(state);
  end

  task automatic clear_counts();
    n_mode = 0; n_set = 0; n_clr = 0; n_load = 0; n_shift = 0; n_sample = 0;
    n_store = 0; n_stop = 0; n_tnext = 0;
  endtask

  // present a packet and wait for its tnext (transfer at the following edge)
  task automatic send(input bit first, input bit last, input bit wr, input int sl);
    ocpout_tvalid = 1'b1; ocpout_tfirst = first; ocpout_tlast = last;
    ocpout_tuser = {wr, 2'(sl)};
    do @(negedge clk); while (!ocpout_tnext);
    @(posedge clk);
    #1;
  endtask

  initial begin
    spi_state_e exp [$];
    int idle_ticks;
    ocpout_tvalid = 0; ocpout_tfirst = 0; ocpout_tlast = 0; ocpout_tuser = '0;
    ocpin_tnext = 1'b1;
    clear_counts();
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;

    // ---- test 1 ----
    @(negedge clk);
    logging = 1;
    send(1, 0, CMD_READ, 2);
    send(0, 1, CMD_WRITE, 2);
    ocpout_tvalid = 1'b0;
    wait (state == ST_IDLE);
    repeat (8) @(posedge clk);
    logging = 0;
    exp.push_back(ST_IDLE);
    repeat (2)  exp.push_back(ST_MODECFG);
    repeat (2)  exp.push_back(ST_CSASS);
    repeat (2)  exp.push_back(ST_CSWAITPRE);
    repeat (16) exp.push_back(ST_DATA);
    repeat (4)  exp.push_back(ST_CSWAITPOST);
    repeat (2)  exp.push_back(ST_CSDEASS);
    exp.push_back(ST_IDLE);
    for (int i = 0; i < exp.size(); i++)
      chk(i < seen.size() && seen[i] == exp[i],
          $sformatf("tick %0d: state %0d, expected %0d", i, i < seen.size() ? seen[i] : -1, exp[i]));
    chk(n_mode == 1 && n_set == 1 && n_clr == 1, "mode/cs strobes");
    chk(n_load == 2 && n_shift == 14 && n_sample == 16, $sformatf("load %0d shift %0d sample %0d", n_load, n_shift, n_sample));
    chk(n_store == 1 && n_stop == 1 && n_tnext == 2, $sformatf("store %0d stop %0d tnext %0d", n_store, n_stop, n_tnext));

    // ---- test 2: blocked input register ----
    clear_counts();
    ocpin_tnext = 1'b0;
    @(negedge clk);
    send(1, 0, CMD_READ, 1);
    ocpout_tvalid = 1'b1; ocpout_tfirst = 0; ocpout_tlast = 1; ocpout_tuser = {CMD_READ, 2'd1};
    wait (ocpin_tvalid);
    chk(ocpin_tfirst && !ocpin_tlast && ocpin_tuser == {CMD_READ, 2'd1}, "flags of first READ word");
    idle_ticks = 0;
    repeat (30) begin
      @(posedge clk iff fe);
      if (state == ST_IDLE) idle_ticks++;
    end
    chk(idle_ticks >= 28 && n_load == 1 && dut.cs_open, $sformatf("held in IDLE %0d ticks", idle_ticks));
    @(negedge clk); ocpin_tnext = 1'b1;
    @(negedge clk); ocpin_tnext = 1'b0;
    do @(negedge clk); while (!ocpout_tnext);
    @(posedge clk); #1 ocpout_tvalid = 1'b0;
    wait (ocpin_tvalid);
    chk(!ocpin_tfirst && ocpin_tlast, "flags of last READ word");
    ocpin_tnext = 1'b1;
    wait (state == ST_IDLE && !dut.cs_open);
    chk(n_load == 2 && n_store == 2, "second packet sent after the register was read");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
