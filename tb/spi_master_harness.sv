// spi_master_harness: drives and checks one spi_master configuration.
//
// Used by tb_spi_master to run the same test at different clock dividers and
// wait times. Four behavioural slaves (modes 0, 1, 2, 3 on chip selects
// 0..3) sit on the SPI pins; MISO can instead be looped back from MOSI.
// Phase 1 (loop-back, every slave): two READ packets 8'hab, 8'hcd sent back
// to back with a sink that is always ready. The returned words must equal
// the sent ones, and the SCLK timing is checked to the cycle:
//   chip select -> first SCLK edge  = (CNT_CSASS+CNT_CSWAITPRE)*CLKDIV
//                                     (+ CLKDIV/2 for CPHA = 0)
//   first -> last SCLK edge         = 2*DW*CLKDIV - CLKDIV/2
//   last SCLK edge -> release       = CNT_CSWAITPOST*CLKDIV (+ CLKDIV/2 for CPHA = 1)
// Phase 2 (slaves): random transactions of 1..5 packets, READ and WRITE
// mixed, random gaps at the source and random back-pressure at the sink.
// Every slave must receive exactly the words sent to it, every READ packet
// must return that slave's reply word with its tuser/tfirst/tlast, and the
// chip-select timing above must hold in every transaction.
// It also counts how often packets follow each other directly in DATA, how
// often the FSM rests in IDLE inside a transaction, and how often a full
// input register held a waiting packet back; each must occur.
module spi_master_harness #(
  parameter int unsigned CLKDIV         = 2,
  parameter int unsigned CNT_CSWAITPRE  = 2,
  parameter int unsigned CNT_CSWAITPOST = 4,
  parameter int unsigned NTXN           = 40
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  import spi_pkg::*;
  localparam int unsigned DW = 8, CSNUM = 4, SW = 2, UW = 3;
  localparam int unsigned CNT_CSASS = 2;
  localparam logic [3:0] CPOL = 4'b1100, CPHA = 4'b1010;
  localparam int unsigned PRE  = (CNT_CSASS + CNT_CSWAITPRE) * CLKDIV;
  localparam int unsigned POST = CNT_CSWAITPOST * CLKDIV;

  axis_if #(.DW(DW), .UW(UW)) ocpout (.clk(clk), .rst(rst));
  axis_if #(.DW(DW), .UW(UW)) ocpin  (.clk(clk), .rst(rst));
  spi_if  #(.CSNUM(CSNUM))    spi    ();

  spi_master #(
    .DW(DW), .CSNUM(CSNUM), .CLKDIV(CLKDIV), .CPOL(CPOL), .CPHA(CPHA),
    .CNT_MODECFG(2), .CNT_CSASS(CNT_CSASS), .CNT_CSWAITPRE(CNT_CSWAITPRE),
    .CNT_DATA(8), .CNT_CSWAITPOST(CNT_CSWAITPOST), .CNT_CSDEASS(2)
  ) dut (
    .clk(clk), .rst(rst), .ocpout(ocpout.dst), .ocpin(ocpin.src), .spi(spi.master)
  );

  // slaves and the shared MISO line
  logic       loopback;
  logic [3:0] s_miso, s_en;
  for (genvar i = 0; i < 4; i++) begin : g_sl
    spi_slave_model #(.CPOL(CPOL[i]), .CPHA(CPHA[i]), .DW(DW), .SEED(8'(8'h31 * (i + 1))))
      u_sl (.sclk(spi.sclk), .mosi(spi.mosi), .cs_n(spi.cs_n[i]), .miso(s_miso[i]),
            .miso_en(s_en[i]));
  end
  assign spi.miso = loopback ? spi.mosi : |(s_miso & s_en);

  // ---------------- bookkeeping shared by driver and monitors ----------------
  int  cyc = 0;
  int  fails = 0, nchk = 0;
  int  cur_slave = 0;
  bit  exact_span = 0;                   // phase 1: packets strictly back to back
  int  exp_edges = 0;                    // SCLK edges expected in this transaction
  logic [DW-1:0] exp_q [$];              // expected READ words
  logic [UW-1:0] exp_u [$];
  logic          exp_f [$], exp_l [$];
  logic [DW-1:0] sent [4][$];            // words sent to each slave (phase 2)
  int  n_b2b = 0, n_idle_gap = 0, n_in_block = 0;
  int  n_mode [4] = '{0, 0, 0, 0};
  logic sink_ready_always = 1'b1;

  assign checks   = nchk;
  assign failures = fails;

  task automatic chk(input bit ok, input string what);
    nchk++;
    if (!ok) begin
      fails++;
      $display("FAIL [div %0d] %s (cycle %0d)", CLKDIV, what, cyc);
    end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- source ----------------
  task automatic send_pkt(input logic [DW-1:0] d, input int sl, input bit wr,
                          input bit first, input bit last);
    ocpout.tdata  <= d;
    ocpout.tuser  <= {wr, SW'(sl)};
    ocpout.tfirst <= first;
    ocpout.tlast  <= last;
    ocpout.tvalid <= 1'b1;
    do @(negedge clk); while (!ocpout.tnext);
    @(posedge clk);                       // the transfer happens at this edge
  endtask

  task automatic src_idle();
    ocpout.tvalid <= 1'b0;
  endtask

  // ---------------- sink ----------------
  always @(negedge clk)
    ocpin.tnext <= sink_ready_always ? 1'b1 : ($urandom_range(0, 15) == 0);

  always @(posedge clk) if (!rst && ocpin.tvalid && ocpin.tnext) begin
    if (exp_q.size() == 0) chk(0, "unexpected word on the input stream");
    else begin
      logic [DW-1:0] e; logic [UW-1:0] u; logic f, l;
      e = exp_q.pop_front(); u = exp_u.pop_front(); f = exp_f.pop_front(); l = exp_l.pop_front();
      chk(ocpin.tdata == e, $sformatf("read data %h, expected %h", ocpin.tdata, e));
      chk(ocpin.tuser == u && ocpin.tfirst == f && ocpin.tlast == l, "read flags not mirrored");
    end
  end

  // ---------------- SPI timing monitor ----------------
  logic [3:0] cs_n_q = '1;
  logic       sclk_q = 1'b0;
  int t_fall = -1, t_first = -1, t_last = -1, n_edges = 0;
  always @(posedge clk) if (!rst) begin
    sclk_q <= spi.sclk;
    cs_n_q <= spi.cs_n;
    if (spi.sclk != sclk_q && spi.cs_n != '1) begin
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
      n_edges++;
    end
    if (cs_n_q == '1 && spi.cs_n != '1) begin
      t_fall = cyc; t_first = -1; n_edges = 0;
      chk($onehot(~spi.cs_n), "more than one chip select");
      chk(spi.cs_n[cur_slave] == 1'b0, "wrong chip select asserted");
      chk(spi.sclk == CPOL[cur_slave], "SCLK not at idle level when CS asserted");
      n_mode[cur_slave]++;
    end
    if (cs_n_q != '1 && spi.cs_n == '1) begin
      chk(t_first - t_fall == int'(PRE + (CPHA[cur_slave] ? 0 : CLKDIV / 2)),
          $sformatf("CS->first SCLK edge %0d cycles", t_first - t_fall));
      chk(cyc - t_last == int'(POST + (CPHA[cur_slave] ? CLKDIV / 2 : 0)),
          $sformatf("last SCLK edge->CS release %0d cycles", cyc - t_last));
      chk(n_edges == exp_edges, $sformatf("%0d SCLK edges, expected %0d", n_edges, exp_edges));
      if (exact_span)
        chk(t_last - t_first == int'(exp_edges / 2 * CLKDIV - CLKDIV / 2),
            $sformatf("data span %0d cycles", t_last - t_first));
    end
    // mechanisms
    if (dut.u_ctrl.state == ST_DATA && dut.u_ctrl.dp.load) n_b2b++;
    if (dut.u_ctrl.state == ST_DATA && dut.u_ctrl.dp.stop && dut.u_ctrl.state_n == ST_IDLE) n_idle_gap++;
    if (dut.u_ctrl.state == ST_IDLE && dut.fe && ocpout.tvalid && ocpin.tvalid && !ocpin.tnext) begin
      n_in_block++;
      chk(!dut.u_ctrl.dp.load && !dut.u_ctrl.dp.mode_load, "packet started while output register full");
    end
  end

  // ---------------- test sequence ----------------
  initial begin
    done = 1'b0;
    loopback = 1'b1;
    ocpout.tvalid = 1'b0; ocpout.tdata = '0; ocpout.tuser = '0;
    ocpout.tfirst = 1'b0; ocpout.tlast = 1'b0;
    @(negedge rst);
    repeat (3) @(posedge clk);

    // phase 1: the bring-up test, two packets 8'hab, 8'hcd per slave, loop-back
    exact_span = 1;
    for (int s = 0; s < 4; s++) begin
      cur_slave = s;
      exp_edges = 2 * 2 * DW;
      exp_q.push_back(8'hab); exp_u.push_back({1'b0, SW'(s)}); exp_f.push_back(1); exp_l.push_back(0);
      exp_q.push_back(8'hcd); exp_u.push_back({1'b0, SW'(s)}); exp_f.push_back(0); exp_l.push_back(1);
      send_pkt(8'hab, s, 1'b0, 1'b1, 1'b0);
      send_pkt(8'hcd, s, 1'b0, 1'b0, 1'b1);
      src_idle();
      wait (spi.cs_n == '1);
      repeat (4 * CLKDIV) @(posedge clk);
    end
    chk(exp_q.size() == 0, "phase 1: words not returned");

    // phase 2: random traffic to real slaves
    exact_span = 0;
    loopback = 1'b0;
    sink_ready_always = 1'b0;
    for (int t = 0; t < int'(NTXN); t++) begin
      int s, n;
      s = (t < 4) ? t : $urandom_range(0, 3);
      n = $urandom_range(1, 5);
      cur_slave = s;
      exp_edges = 2 * DW * n;
      for (int p = 0; p < n; p++) begin
        logic [DW-1:0] d; bit wr; int gap;
        d  = 8'($urandom);
        gap = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 3 * CLKDIV) : 0;
        wr = $urandom_range(0, 1);
        if (!wr) begin
          exp_q.push_back(g_reply(s, sent[s].size()));
          exp_u.push_back({1'b0, SW'(s)});
          exp_f.push_back(p == 0); exp_l.push_back(p == n - 1);
        end
        sent[s].push_back(d);
        if (gap > 0) begin
          src_idle();
          repeat (gap) @(posedge clk);
        end
        send_pkt(d, s, wr, p == 0, p == n - 1);
      end
      src_idle();
      wait (spi.cs_n == '1);
      repeat ($urandom_range(2, 3 * CLKDIV)) @(posedge clk);   // let the monitor see the release
    end
    sink_ready_always = 1'b1;
    repeat (20 * CLKDIV) @(posedge clk);
    chk(exp_q.size() == 0, "phase 2: READ words missing");

    // every slave received exactly what was sent to it (phase 2 only, after
    // the two loop-back words of phase 1)
    begin
      int rc [4]; int ie, be;
      rc[0] = g_sl[0].u_sl.rx_count; rc[1] = g_sl[1].u_sl.rx_count;
      rc[2] = g_sl[2].u_sl.rx_count; rc[3] = g_sl[3].u_sl.rx_count;
      ie = g_sl[0].u_sl.idle_err + g_sl[1].u_sl.idle_err + g_sl[2].u_sl.idle_err + g_sl[3].u_sl.idle_err;
      be = g_sl[0].u_sl.bit_err + g_sl[1].u_sl.bit_err + g_sl[2].u_sl.bit_err + g_sl[3].u_sl.bit_err;
      chk(ie == 0, "a slave saw SCLK off its idle level at CS assertion");
      chk(be == 0, "a chip select was released inside a word");
      for (int s = 0; s < 4; s++) begin
        chk(rc[s] == 2 + sent[s].size(), $sformatf("slave %0d received %0d words", s, rc[s]));
        for (int k = 0; k < sent[s].size() && k + 2 < rc[s]; k++)
          chk(g_rx(s, k + 2) == sent[s][k], $sformatf("slave %0d word %0d", s, k));
      end
    end
    for (int s = 0; s < 4; s++) chk(n_mode[s] > 0, $sformatf("mode %0d never used", s));
    chk(n_b2b > 0, "no back-to-back packets");
    chk(n_idle_gap > 0, "no rest in IDLE inside a transaction");
    chk(n_in_block > 0, "full input register never held a packet back");
    $display("[div %0d] back-to-back %0d, IDLE gaps %0d, held by full register %0d, modes %0d/%0d/%0d/%0d",
             CLKDIV, n_b2b, n_idle_gap, n_in_block, n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    done = 1'b1;
  end

  // reply word k of slave s, as produced by the slave model; words 0 and 1
  // were exchanged in phase 1
  function automatic logic [DW-1:0] g_reply(int s, int k);
    case (s)
      0: return g_sl[0].u_sl.reply_word(k + 2);
      1: return g_sl[1].u_sl.reply_word(k + 2);
      2: return g_sl[2].u_sl.reply_word(k + 2);
      default: return g_sl[3].u_sl.reply_word(k + 2);
    endcase
  endfunction

  function automatic logic [DW-1:0] g_rx(int s, int k);
    case (s)
      0: return g_sl[0].u_sl.rx_mem[k];
      1: return g_sl[1].u_sl.rx_mem[k];
      2: return g_sl[2].u_sl.rx_mem[k];
      default: return g_sl[3].u_sl.rx_mem[k];
    endcase
  endfunction
endmodule
