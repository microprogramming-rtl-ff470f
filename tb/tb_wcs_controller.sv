// tb_wcs_controller: checks the controller with the writable control store.
//
// The testbench keeps its own copy of the 64-word store and its own model of
// the sequencer:
//   - next  -> uPC+1;
//   - spin  -> hold while busy;
//   - fetch -> fetch0;
//   - dispatch -> op-group start, from a table written here;
//   - feqz / fnez -> fetch0 or uPC+1, depending on zero?.
// While reset is held, it fills the store with random control words and
// jump types.  It then runs 4000 cycles with random opcode, zero? and busy
// inputs.  In every cycle it checks uPC, the control word and the jump type
// against the model.  In about one cycle in four it also writes a random word
// at a random address.  The model applies that write at the same clock edge,
// so a patch of the word being executed shows from the next cycle on.  A
// directed part first checks that, after loading, the uPC steps through
// words 0, 1, 2 with their contents.
module tb_wcs_controller;
  import ucode_pkg::*;
  logic    clk = 0, rst = 1;
  opcode_t opcode = 0;
  logic    zero = 0, busy = 0;
  ctrl_t   ctrl;
  uaddr_t  upc;
  ujump_e  jump;
  logic    wcs_we = 0;
  uaddr_t  wcs_addr = '0;
  uinst_t  wcs_wdata = '0;
  int checks = 0, failures = 0;

  wcs_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  uinst_t model [64];

  function automatic uaddr_t group_of(opcode_t op);
    case (op)
      6'h00: return 6'd4;
      6'h08, 6'h09, 6'h0A, 6'h0B: return 6'd7;
      6'h0C, 6'h0D, 6'h0E, 6'h0F: return 6'd10;
      6'h23: return 6'd13;
      6'h2B: return 6'd18;
      6'h04: return 6'd23;
      6'h05: return 6'd28;
      6'h02: return 6'd33;
      6'h12: return 6'd36;
      6'h03: return 6'd38;
      6'h13: return 6'd42;
      6'h3C: return 6'd46;
      6'h3D: return 6'd53;
      6'h3E: return 6'd57;
      default: return 6'd0;
    endcase
  endfunction

  function automatic uaddr_t next_of(uaddr_t pc, ujump_e j, logic z, logic b, opcode_t op);
    case (j)
      J_NEXT:     return pc + 1'b1;
      J_SPIN:     return b ? pc : pc + 1'b1;
      J_FETCH:    return 6'd0;
      J_DISPATCH: return group_of(op);
      J_FEQZ:     return z ? 6'd0 : pc + 1'b1;
      J_FNEZ:     return z ? pc + 1'b1 : 6'd0;
      default:    return 6'd0;
    endcase
  endfunction

  function automatic uinst_t random_word(bit any_jump);
    uinst_t w;
    w.ctrl = ctrl_t'($urandom);
    // jump types 0..5; mostly "next" so that runs of words are executed
    if (any_jump) w.jump = ujump_e'($urandom_range(0, 5));
    else          w.jump = J_NEXT;
    return w;
  endfunction

  initial begin
    uaddr_t exp_upc;
    int nwrites = 0, nspin = 0, ndisp = 0, nz = 0;
    // load the store during reset
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      model[i] = random_word(($urandom_range(0, 3) == 0));
      wcs_we = 1; wcs_addr = uaddr_t'(i); wcs_wdata = model[i];
      @(negedge clk);
    end
    wcs_we = 0;
    // directed: first words after reset, inputs quiet
    model[0].jump = J_NEXT; model[1].jump = J_NEXT;
    wcs_we = 1; wcs_addr = 6'd0; wcs_wdata = model[0];
    @(negedge clk);
    wcs_addr = 6'd1; wcs_wdata = model[1];
    @(negedge clk);
    wcs_we = 0;
    rst = 0;
    for (int i = 0; i < 3; i++) begin
      #1;
      chk(upc == uaddr_t'(i), $sformatf("after reset uPC %0d, expected %0d", upc, i));
      chk(ctrl == model[i].ctrl, $sformatf("word %0d control bits", i));
      if (i < 2) @(negedge clk);
    end
    // random run
    exp_upc = upc;
    for (int c = 0; c < 4000; c++) begin
      opcode = opcode_t'($urandom);
      if ($urandom_range(0, 1)) opcode = 6'h3C + opcode_t'($urandom_range(0, 2));
      zero = 1'($urandom);
      busy = ($urandom_range(0, 2) != 0);
      wcs_we = ($urandom_range(0, 3) == 0);
      wcs_addr = uaddr_t'($urandom);
      wcs_wdata = random_word(1);
      #1;
      chk(upc == exp_upc, $sformatf("cycle %0d: uPC %0d, expected %0d", c, upc, exp_upc));
      chk(ctrl == model[upc].ctrl && jump == model[upc].jump,
          $sformatf("cycle %0d: word %0d contents", c, upc));
      if (jump == J_SPIN && busy) nspin++;
      if (jump == J_DISPATCH) ndisp++;
      if ((jump == J_FEQZ || jump == J_FNEZ) && zero) nz++;
      exp_upc = next_of(upc, model[upc].jump, zero, busy, opcode);
      if (wcs_we) begin model[wcs_addr] = wcs_wdata; nwrites++; end
      @(negedge clk);
    end
    wcs_we = 0;
    chk(nwrites > 100 && nspin > 10 && ndisp > 10 && nz > 10,
        $sformatf("coverage: %0d writes, %0d spins, %0d dispatches, %0d zero tests",
                  nwrites, nspin, ndisp, nz));
    $display("writes %0d, spin holds %0d, dispatches %0d, zero tests %0d",
             nwrites, nspin, ndisp, nz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
