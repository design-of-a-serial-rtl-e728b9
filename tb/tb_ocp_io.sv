// tb_ocp_io: self-checking test of the OCP register block with blocking.
//
// Uses CNT_BLOCK = 50 to keep the time-out short. Checks:
//  * reset value OINIT on out; a write sets out; a read returns the
//    synchronised input with SResp = DVA one cycle after the accept;
//  * a write to an address whose low twelve bits are 12'h111 is held
//    (no SCmdAccept, blocking high, out unchanged) while the interrupt
//    in[0] is inactive (high), and accepted in the third cycle after in[0]
//    goes low (two synchroniser stages);
//  * with in[0] kept high the same write is accepted after exactly
//    CNT_BLOCK cycles of blocking (time-out), counted from the first cycle
//    the command is on the bus: CNT_BLOCK + 1 cycles in all;
//  * the address check uses only the low twelve bits.
module tb_ocp_io;
  import ocp_pkg::*;
  localparam int unsigned CNT_BLOCK = 50;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  ocp_mcmd_e   mcmd;
  logic [31:0] maddr, mdata, sdata;
  logic        scmdaccept, blocking;
  ocp_sresp_e  sresp;
  logic [0:0]  in;
  logic [1:0]  out;
  int checks = 0, failures = 0;
  int n_int_release = 0, n_timeout_release = 0;

  always #5 clk = ~clk;

  ocp_io #(.AW(32), .DW(32), .IW(1), .OW(2), .OINIT(2'b10), .CNT_BLOCK(CNT_BLOCK)) dut (
    .clk(clk), .rst(rst), .mcmd(mcmd), .maddr(maddr), .mdata(mdata),
    .scmdaccept(scmdaccept), .sresp(sresp), .sdata(sdata),
    .in(in), .out(out), .blocking(blocking)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // issue one command, hold it until accepted; returns cycles until accept
  task automatic ocp_cmd(input ocp_mcmd_e c, input logic [31:0] a, input logic [31:0] d,
                         output int cycles);
    cycles = 0;
    @(negedge clk);
    mcmd = c; maddr = a; mdata = d;
    forever begin
      #1;
      cycles++;
      if (scmdaccept) break;
      @(negedge clk);
    end
    @(negedge clk);
    mcmd = MCMD_IDLE;
  endtask

  int n;
  initial begin
    mcmd = MCMD_IDLE; maddr = '0; mdata = '0; in = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    chk(out == 2'b10, "out not at OINIT after reset");

    // plain write and read
    ocp_cmd(MCMD_WR, 32'h0000_0004, 32'h1, n);
    chk(n == 1 && out == 2'b01, "plain write");
    in = 1'b0; repeat (3) @(negedge clk);
    ocp_cmd(MCMD_RD, 32'h8, 32'h0, n);
    chk(n == 1, "read accepted at once");
    chk(sresp == SRESP_DVA && sdata == 32'h0, "read data in=0");
    @(negedge clk);
    chk(sresp == SRESP_NULL, "response lasts one cycle");
    in = 1'b1; repeat (3) @(negedge clk);
    ocp_cmd(MCMD_RD, 32'h8, 32'h0, n);
    chk(sresp == SRESP_DVA && sdata == 32'h1, "read data in=1");

    // blocking write released by the interrupt after 20 cycles
    fork
      ocp_cmd(MCMD_WR, 32'hABCD_E111, 32'h3, n);
      begin
        repeat (20) @(negedge clk);
        chk(blocking && !scmdaccept, "bus held while interrupt inactive");
        chk(out == 2'b01, "blocking write must not change out");
        in = 1'b0;
      end
    join
    // command on the bus from cycle 1; in falls at the end of cycle 20 and
    // passes the two synchroniser stages, so the accept shows in cycle 22
    chk(n == 22, $sformatf("released by interrupt after %0d cycles", n));
    if (n == 22) n_int_release++;
    chk(!blocking, "blocking cleared");
    in = 1'b1; repeat (4) @(negedge clk);

    // blocking write released by the time-out
    ocp_cmd(MCMD_WR, 32'h0000_0111, 32'h0, n);
    chk(n == CNT_BLOCK + 1, $sformatf("time-out after %0d cycles", n));
    if (n == CNT_BLOCK + 1) n_timeout_release++;
    chk(out == 2'b01, "out unchanged after blocking write");

    // only the low twelve bits count
    ocp_cmd(MCMD_WR, 32'h0000_1110, 32'h2, n);
    chk(n == 1 && out == 2'b10, "address 0x1110 is a plain write");

    chk(n_int_release == 1 && n_timeout_release == 1, "both release paths seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
