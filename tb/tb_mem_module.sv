// tb_mem_module: checks the slow memory.  With the default latency every
// access must keep busy high for exactly 10 cycles after enable rises and
// then finish in one more cycle; reads must return what was written (through
// the bus port or the direct port), drive must follow Enable AND NOT Write,
// and a write must not land before busy falls.  A second instance with no
// latency must finish every access in its first cycle.
module tb_mem_module;
  localparam int unsigned LAT = 10;     // default of mem_module
  logic        clk = 0, rst = 1;
  logic [31:0] addr = 0, wdata = 0, rdata, rdata0;
  logic        enable = 0, write = 0, drive, busy, drive0, busy0;
  logic        host_we = 0;
  logic [31:0] host_addr = 0, host_wdata = 0, host_rdata, host_rdata0;
  int checks = 0, failures = 0;
  logic [31:0] model [1024];

  mem_module dut (.*);
  mem_module #(.DEPTH(64), .LATENCY(0)) dut0 (
    .clk(clk), .rst(rst), .addr(addr), .enable(enable), .write(write), .wdata(wdata),
    .rdata(rdata0), .drive(drive0), .busy(busy0), .host_we(host_we), .host_addr(host_addr),
    .host_wdata(host_wdata), .host_rdata(host_rdata0));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One access through the bus port; returns the number of busy cycles.
  task automatic access(bit wr, int widx, logic [31:0] d, output int nbusy, output logic [31:0] rd);
    @(negedge clk);
    addr = 32'(widx) << 2; wdata = d; write = wr; enable = 1;
    nbusy = 0;
    host_addr = widx;
    #1;
    chk(drive == !wr, "drive = enable & !write");
    while (busy) begin
      if (wr) chk(host_rdata == model[widx], "write landed early");
      @(negedge clk);
      nbusy++;
    end
    rd = rdata;
    @(negedge clk);
    enable = 0; write = 0;
    #1;
    chk(!busy && !drive, "idle after access");
  endtask

  initial begin
    int nb;
    logic [31:0] rd;
    repeat (2) @(posedge clk);
    // fill through the direct port
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      host_we = 1; host_addr = i; host_wdata = $urandom; model[i] = host_wdata;
    end
    @(negedge clk);
    host_we = 0;
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      int w = $urandom_range(0, 1023);
      bit wr = n % 3 == 0;
      logic [31:0] d = $urandom;
      access(wr, w, d, nb, rd);
      chk(nb == LAT, $sformatf("busy cycles %0d, expected %0d", nb, LAT));
      if (wr) begin
        model[w] = d;
        host_addr = w; #1;
        chk(host_rdata == d, "write visible on direct port");
      end else begin
        chk(rd == model[w], $sformatf("read word %0d = %h exp %h", w, rd, model[w]));
      end
    end
    // zero-latency instance: never busy
    @(negedge clk);
    addr = 32'h10; enable = 1; write = 0; #1;
    chk(!busy0 && drive0, "zero-latency read not busy");
    @(negedge clk);
    enable = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
