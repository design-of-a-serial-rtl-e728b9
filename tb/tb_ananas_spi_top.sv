// tb_ananas_spi_top: end-to-end test of the slow-control path at the
// default parameters (four slaves in modes 0..3, CLKDIV = 2, the CNT_*
// values of the bring-up test, CNT_BLOCK = 700000).
//
// Four behavioural SPI slaves hang on the pins; slave 3 (mode 3) stands for
// the SPI-to-I2C bridge and pulls the interrupt line io_in[0] low 300 cycles
// after a WRITE transaction to it ends, and releases it when it is selected
// again. The test
//  1. sends the bring-up pattern (READ 8'hab, 8'hcd) to every slave and
//     checks the words each slave received and the reply words returned,
//     and the chip-select-to-SCLK and SCLK-to-release times to the cycle;
//  2. sends READ packets while the stream sink refuses words, so the master
//     must rest in IDLE with the chip select open;
//  3. plays the bridge sequence: WRITE packets to slave 3, then a dummy write
//     to ocp_io address 0x111. The bus must stay held until the interrupt
//     fires and be released within three cycles of it; then the buffer is
//     read with READ packets;
//  4. repeats the dummy write with no interrupt: the bus must be released by
//     the time-out after exactly CNT_BLOCK + 1 cycles;
//  5. checks plain ocp_io register writes and reads.
// Every mechanism (four modes, back-to-back packets, IDLE rest inside a
// transaction, full input register holding a packet, READ return, WRITE,
// release by interrupt, release by time-out) is counted and must occur.
module tb_ananas_spi_top;
  import spi_pkg::*;
  import ocp_pkg::*;
  localparam int DW = 8, UW = 3, D = 2;
  localparam int PRE = (2 + 2) * D, POST = 4 * D, CNT_BLOCK = 700000;
  localparam logic [3:0] CPOL = 4'b1100, CPHA = 4'b1010;

  logic clk = 1'b0, rst = 1'b1;
  logic [DW-1:0] ocpout_tdata, ocpin_tdata;
  logic [UW-1:0] ocpout_tuser, ocpin_tuser;
  logic ocpout_tfirst, ocpout_tlast, ocpout_tvalid, ocpout_tnext;
  logic ocpin_tfirst, ocpin_tlast, ocpin_tvalid, ocpin_tnext;
  logic spi_sclk, spi_mosi, spi_miso;
  logic [3:0] spi_cs_n;
  ocp_mcmd_e ocp_mcmd;
  logic [31:0] ocp_maddr, ocp_mdata, ocp_sdata;
  logic ocp_scmdaccept, io_blocking;
  ocp_sresp_e ocp_sresp;
  logic [0:0] io_in;
  logic [1:0] io_out;

  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ananas_spi_top dut (
    .clk(clk), .rst(rst),
    .ocpout_tdata(ocpout_tdata), .ocpout_tuser(ocpout_tuser), .ocpout_tfirst(ocpout_tfirst),
    .ocpout_tlast(ocpout_tlast), .ocpout_tvalid(ocpout_tvalid), .ocpout_tnext(ocpout_tnext),
    .ocpin_tdata(ocpin_tdata), .ocpin_tuser(ocpin_tuser), .ocpin_tfirst(ocpin_tfirst),
    .ocpin_tlast(ocpin_tlast), .ocpin_tvalid(ocpin_tvalid), .ocpin_tnext(ocpin_tnext),
    .spi_sclk(spi_sclk), .spi_mosi(spi_mosi), .spi_miso(spi_miso), .spi_cs_n(spi_cs_n),
    .ocp_mcmd(ocp_mcmd), .ocp_maddr(ocp_maddr), .ocp_mdata(ocp_mdata),
    .ocp_scmdaccept(ocp_scmdaccept), .ocp_sresp(ocp_sresp), .ocp_sdata(ocp_sdata),
    .io_in(io_in), .io_out(io_out), .io_blocking(io_blocking)
  );

  logic [3:0] s_miso, s_en;
  for (genvar i = 0; i < 4; i++) begin : g_sl
    spi_slave_model #(.CPOL(CPOL[i]), .CPHA(CPHA[i]), .DW(DW), .SEED(8'(8'h17 + 8'h40 * i)))
      u_sl (.sclk(spi_sclk), .mosi(spi_mosi), .cs_n(spi_cs_n[i]), .miso(s_miso[i]),
            .miso_en(s_en[i]));
  end
  assign spi_miso = |(s_miso & s_en);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_mode [4] = '{0, 0, 0, 0};
  int n_b2b = 0, n_idle_rest = 0, n_held = 0, n_read = 0, n_write = 0;
  int n_int_release = 0, n_timeout_release = 0;

  // ---------------- bridge interrupt model (slave 3) ----------------
  bit last_txn_write = 0;
  int int_due = -1;
  always @(posedge clk) begin
    if (rst) io_in <= 1'b1;
    else begin
      if (!spi_cs_n[3]) io_in <= 1'b1;            // selected again: status read, INT released
      if (int_due >= 0 && cyc == int_due) io_in <= 1'b0;
    end
  end

  // ---------------- stream sink ----------------
  bit sink_hold = 0;
  logic [DW-1:0] exp_q [$];
  always @(negedge clk) ocpin_tnext = !sink_hold;
  always @(posedge clk) if (!rst && ocpin_tvalid && ocpin_tnext) begin
    n_read++;
    if (exp_q.size() == 0) chk(0, "unexpected READ word");
    else begin
      logic [DW-1:0] e;
      e = exp_q.pop_front();
      chk(ocpin_tdata == e, $sformatf("READ word %h, expected %h", ocpin_tdata, e));
    end
  end

  // ---------------- SPI monitor ----------------
  logic [3:0] cs_q = '1;
  logic sclk_q = 0;
  int cur = 0, t_fall = 0, t_first = -1, t_last = 0, n_edges = 0, exp_edges = 0;
  always @(posedge clk) if (!rst) begin
    cs_q <= spi_cs_n; sclk_q <= spi_sclk;
    if (spi_sclk != sclk_q && spi_cs_n != '1) begin
      if (t_first < 0) t_first = cyc;
      t_last = cyc; n_edges++;
    end
    if (cs_q == '1 && spi_cs_n != '1) begin
      t_fall = cyc; t_first = -1; n_edges = 0;
      chk(spi_cs_n == ~(4'(1 << cur)), "chip select of the addressed slave");
      chk(spi_sclk == CPOL[cur], "SCLK idle level at chip select");
      n_mode[cur]++;
    end
    if (cs_q != '1 && spi_cs_n == '1) begin
      chk(t_first - t_fall == PRE + (CPHA[cur] ? 0 : D / 2), $sformatf("CS->SCLK %0d", t_first - t_fall));
      chk(cyc - t_last == POST + (CPHA[cur] ? D / 2 : 0), $sformatf("SCLK->CS release %0d", cyc - t_last));
      chk(n_edges == exp_edges, $sformatf("%0d SCLK edges, expected %0d", n_edges, exp_edges));
    end
    if (dut.u_spi.u_ctrl.state == ST_DATA && dut.u_spi.u_ctrl.dp.load) n_b2b++;
    if (dut.u_spi.u_ctrl.state == ST_IDLE && dut.u_spi.u_ctrl.cs_open && dut.u_spi.fe) n_idle_rest++;
    if (dut.u_spi.u_ctrl.state == ST_IDLE && dut.u_spi.fe && ocpout_tvalid && ocpin_tvalid && !ocpin_tnext)
      n_held++;
  end

  // ---------------- stream source ----------------
  int sent_cnt [4] = '{0, 0, 0, 0};
  logic [DW-1:0] sent [4][$];

  function automatic logic [DW-1:0] reply(int s, int k);
    case (s)
      0: return g_sl[0].u_sl.reply_word(k);
      1: return g_sl[1].u_sl.reply_word(k);
      2: return g_sl[2].u_sl.reply_word(k);
      default: return g_sl[3].u_sl.reply_word(k);
    endcase
  endfunction

  task automatic txn(input int s, input bit wr, input int n, input logic [DW-1:0] first_words [2]);
    cur = s;
    exp_edges = 2 * DW * n;
    for (int p = 0; p < n; p++) begin
      logic [DW-1:0] d;
      d = (p < 2) ? first_words[p] : 8'($urandom);
      if (!wr) exp_q.push_back(reply(s, sent_cnt[s]));
      if (wr) n_write++;
      sent[s].push_back(d);
      sent_cnt[s]++;
      @(negedge clk);
      ocpout_tdata = d; ocpout_tuser = {wr, 2'(s)};
      ocpout_tfirst = (p == 0); ocpout_tlast = (p == n - 1); ocpout_tvalid = 1'b1;
      while (!ocpout_tnext) @(negedge clk);
    end
    @(negedge clk);
    ocpout_tvalid = 1'b0;
    wait (spi_cs_n == '1);
    repeat (4) @(posedge clk);
  endtask

  // ---------------- OCP master ----------------
  task automatic ocp(input ocp_mcmd_e c, input logic [31:0] a, input logic [31:0] d, output int cycles);
    @(negedge clk);
    ocp_mcmd = c; ocp_maddr = a; ocp_mdata = d;
    cycles = 0;
    forever begin
      #1;
      cycles++;
      if (ocp_scmdaccept) break;
      @(negedge clk);
    end
    @(negedge clk);
    ocp_mcmd = MCMD_IDLE;
  endtask

  initial begin
    logic [DW-1:0] w [2];
    int n, t_int;
    ocpout_tvalid = 0; ocpout_tdata = '0; ocpout_tuser = '0; ocpout_tfirst = 0; ocpout_tlast = 0;
    ocp_mcmd = MCMD_IDLE; ocp_maddr = '0; ocp_mdata = '0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);

    // 1. bring-up pattern on every slave
    w = '{8'hab, 8'hcd};
    for (int s = 0; s < 4; s++) txn(s, 1'b0, 2, w);

    // 2. READ packets while the sink holds the input register
    sink_hold = 1;
    fork
      txn(1, 1'b0, 3, '{8'h11, 8'h22});
      begin
        repeat (200) @(posedge clk);
        sink_hold = 0;
      end
    join

    // 3. bridge sequence: write to slave 3, hold the bus until INT
    txn(3, 1'b1, 4, '{8'h00, 8'h05});
    int_due = cyc + 300;
    ocp(MCMD_WR, 32'h0000_0111, 32'h0, n);
    t_int = int_due;
    int_due = -1;
    chk(cyc > t_int && cyc - t_int <= 5, $sformatf("bus released %0d cycles after INT", cyc - t_int));
    if (cyc > t_int && cyc - t_int <= 5) n_int_release++;
    txn(3, 1'b0, 3, '{8'h06, 8'h00});
    chk(io_in == 1'b1, "INT released by the read");

    // 4. no interrupt: time-out
    ocp(MCMD_WR, 32'h0000_0111, 32'h0, n);
    chk(n == CNT_BLOCK + 1, $sformatf("time-out after %0d cycles", n));
    if (n == CNT_BLOCK + 1) n_timeout_release++;

    // 5. plain register access
    ocp(MCMD_WR, 32'h0000_0000, 32'h3, n);
    chk(io_out == 2'b11, "io_out written");
    ocp(MCMD_RD, 32'h0000_0004, 32'h0, n);
    chk(ocp_sresp == SRESP_DVA && ocp_sdata == 32'h1, "io_in read");

    // slaves received exactly what was sent
    repeat (10) @(posedge clk);
    chk(exp_q.size() == 0, "READ words missing");
    for (int s = 0; s < 4; s++) begin
      int rc;
      case (s)
        0: rc = g_sl[0].u_sl.rx_count;
        1: rc = g_sl[1].u_sl.rx_count;
        2: rc = g_sl[2].u_sl.rx_count;
        default: rc = g_sl[3].u_sl.rx_count;
      endcase
      chk(rc == sent[s].size(), $sformatf("slave %0d got %0d words", s, rc));
      for (int k = 0; k < sent[s].size(); k++) begin
        logic [DW-1:0] got;
        case (s)
          0: got = g_sl[0].u_sl.rx_mem[k];
          1: got = g_sl[1].u_sl.rx_mem[k];
          2: got = g_sl[2].u_sl.rx_mem[k];
          default: got = g_sl[3].u_sl.rx_mem[k];
        endcase
        chk(got == sent[s][k], $sformatf("slave %0d word %0d: %h, sent %h", s, k, got, sent[s][k]));
      end
    end
    chk(g_sl[0].u_sl.idle_err + g_sl[1].u_sl.idle_err + g_sl[2].u_sl.idle_err + g_sl[3].u_sl.idle_err == 0,
        "SCLK idle level");

    for (int s = 0; s < 4; s++) chk(n_mode[s] > 0, $sformatf("mode %0d never used", s));
    chk(n_b2b > 0, "no back-to-back packets");
    chk(n_idle_rest > 0, "no IDLE rest inside a transaction");
    chk(n_held > 0, "full input register never held a packet");
    chk(n_read > 0 && n_write > 0, "READ and WRITE both used");
    chk(n_int_release > 0 && n_timeout_release > 0, "both bus release paths used");
    $display("modes %0d/%0d/%0d/%0d back-to-back %0d idle-rest %0d held %0d reads %0d writes %0d int %0d timeout %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_b2b, n_idle_rest, n_held, n_read, n_write,
             n_int_release, n_timeout_release);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CNT_BLOCK + 20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
