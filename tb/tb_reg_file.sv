// tb_reg_file: checks the register file (32 GPRs + PC).  After reset every
// GPR reads 0 and the PC reads the reset value; then random writes and reads
// are compared with a model array, register 0 must stay zero, register 32
// must be the PC (also visible on the pc output), and a write only lands at
// the clock edge.
module tb_reg_file;
  localparam logic [31:0] RPC = 32'h0000_0400;
  logic        clk = 0, rst = 1, we = 0;
  logic [5:0]  addr = 0;
  logic [31:0] wdata = 0, rdata, pc;
  int checks = 0, failures = 0;
  logic [31:0] model [33];

  reg_file #(.RESET_PC(RPC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) model[i] = 0;
    model[32] = RPC;
    for (int i = 0; i < 33; i++) begin
      addr = 6'(i); #1;
      chk(rdata == model[i], $sformatf("reset value of r%0d = %h", i, rdata));
    end
    chk(pc == RPC, "pc after reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr  = 6'($urandom_range(0, 32));
      wdata = $urandom;
      we    = $urandom_range(0, 1);
      #1;
      chk(rdata == model[addr], $sformatf("read r%0d before edge", addr));
      @(posedge clk);
      if (we && addr != 0) model[addr] = wdata;
      #1;
      chk(rdata == model[addr], $sformatf("read r%0d after edge = %h exp %h", addr, rdata, model[addr]));
      chk(pc == model[32], "pc output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
