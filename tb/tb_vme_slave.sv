// tb_vme_slave: checks decoding and handshake of the VME slave front end.
// A five-register file is attached to the slave (base A5, module code 3).
// Writes and reads must be acknowledged for the four extended address
// modifiers and a matching address, and ignored (no DTACK*) otherwise.
// DTACK* must come within 6 clock cycles of DS*.
`timescale 1ns/1ps
module tb_vme_slave;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic        as_n, ds_n, write_n, dtack_n;
  logic [5:0]  am;
  logic [31:0] addr, wdata, rdata;
  logic        reg_wr, reg_rd;
  logic [5:0]  reg_idx;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [5];
  int checks = 0, failures = 0, wr_strobes = 0;

  vme_slave #(.NUM_REGS(5)) dut (
    .clk, .rst_n, .sw_base(8'hA5), .mod_code(4'h3),
    .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_am(am),
    .vme_addr(addr), .vme_wdata(wdata), .vme_rdata(rdata), .vme_dtack_n(dtack_n),
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rdata
  );
  vme_master m (.as_n, .ds_n, .write_n, .am, .addr, .wdata, .rdata, .dtack_n);

  always_ff @(posedge clk) if (reg_wr) begin
    regs[reg_idx] <= reg_wdata;
    wr_strobes++;
  end
  assign reg_rdata = (reg_idx < 5) ? regs[reg_idx] : 32'hDEAD_BEEF;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // DS* to DTACK* latency, measured in clock cycles
  realtime t_ds;
  int max_lat = 0;
  always @(negedge ds_n) t_ds = $realtime;
  always @(negedge dtack_n) if (int'(($realtime - t_ds) / 25.0) > max_lat) max_lat = int'(($realtime - t_ds) / 25.0);

  initial begin
    logic ack; logic [31:0] rd; int n_before;
    for (int i = 0; i < 5; i++) regs[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    // valid writes to all five registers, read back
    for (int i = 0; i < 5; i++) begin
      m.write(32'hA5000300 + 4*i, 32'h1000_0000 * (i + 1) + i, ack);
      check(ack, $sformatf("write reg %0d acknowledged", i));
    end
    for (int i = 0; i < 5; i++) begin
      m.read(32'hA5000300 + 4*i, rd, ack);
      check(ack && rd == 32'h1000_0000 * (i + 1) + i, $sformatf("read reg %0d = %h", i, rd));
    end
    // every accepted address modifier
    begin
      logic [5:0] ams [4] = '{6'h0E, 6'h0D, 6'h0A, 6'h09};
      for (int k = 0; k < 4; k++) begin
        m.cycle(1'b0, 32'hA5000304, 0, ams[k], rd, ack);
        check(ack && rd == 32'h2000_0001, $sformatf("AM %h accepted", ams[k]));
      end
    end
    // refused accesses: wrong AM, base, upper zeros, module code, offset
    n_before = wr_strobes;
    m.cycle(1'b1, 32'hA5000300, 32'h1, 6'h39, rd, ack); check(!ack, "A24 AM refused");
    m.cycle(1'b1, 32'hA5000300, 32'h1, 6'h2D, rd, ack); check(!ack, "A16 AM refused");
    m.cycle(1'b1, 32'hA4000300, 32'h1, 6'h09, rd, ack); check(!ack, "other base refused");
    m.cycle(1'b1, 32'hA5010300, 32'h1, 6'h09, rd, ack); check(!ack, "outside 4K space refused");
    m.cycle(1'b1, 32'hA5000400, 32'h1, 6'h09, rd, ack); check(!ack, "other module refused");
    m.cycle(1'b1, 32'hA5000314, 32'h1, 6'h09, rd, ack); check(!ack, "register 5 refused");
    check(wr_strobes == n_before, "no register written by refused cycles");
    m.read(32'hA5000300, rd, ack);
    check(ack && rd == 32'h1000_0000, "register 0 unchanged");
    check(max_lat <= 6, $sformatf("DTACK latency %0d cycles", max_lat));
    check(rdata == 0 && dtack_n, "bus released when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
