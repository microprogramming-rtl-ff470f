// mem_module: the main memory, a slow RAM that answers with a busy signal.
//
// The memory is word-organised (byte address, the two low bits ignored) and
// sits on the bus.  It is controlled by Enable and Write(1)/Read(0): a read
// (enable, !write) drives the addressed word onto the bus (drive = 1), a
// write (enable, write) stores the bus value.  The memory is slower than a
// register transfer: once enable is raised it holds busy high for LATENCY
// cycles; in the cycle where busy is low the read data is valid and a write
// is performed at the clock edge ending it.  The controller's "spin" states
// repeat their transfer until busy falls, so the last repetition carries the
// valid word.  enable must then drop for at least one cycle before the next
// access (the microprogram always has a non-memory state in between); the
// address (MA) must stay stable during an access (checked by an assertion).
//
// A second port (host_*) lets a test or loader write and read words directly
// while the machine is held in reset.
//
// The enable/write gating (write enable = Write AND Enable, output drive =
// Enable AND NOT Write) follows the memory-module drawing; the busy protocol
// follows "memory operates asynchronously and is slow"; the latency count,
// the depth and the host port are this design's choices.
module mem_module #(
  parameter int unsigned DEPTH   = 1024,  // words
  parameter int unsigned LATENCY = 10     // busy cycles per access
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] addr,
  input  logic        enable,
  input  logic        write,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        drive,
  output logic        busy,
  // direct port
  input  logic        host_we,
  input  logic [31:0] host_addr,   // word index
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(LATENCY + 2);

  logic [31:0] mem [DEPTH];
  logic [CW-1:0] cnt;
  logic [AW-1:0] widx;
  logic          we;

  assign widx  = addr[AW+1:2];
  assign busy  = enable && (cnt != CW'(LATENCY));
  assign drive = enable && !write;
  assign we    = enable && write;
  assign rdata = mem[widx];
  assign host_rdata = mem[host_addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst || !enable || !busy) cnt <= '0;
    else                         cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we && !busy) mem[widx] <= wdata;
    else if (host_we) mem[host_addr[AW-1:0]] <= host_wdata;
  end

  // The address must not change while an access is waiting.
  a_addr_stable: assert property (@(posedge clk) disable iff (rst)
    (enable && busy) |=> (!enable || $stable(addr)));
endmodule
