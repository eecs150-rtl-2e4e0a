// tb_branch_unit: random test of branch decisions and targets. Operands are
// drawn so that equal, zero, negative and positive cases all occur; expected
// decisions, targets (PC + 4 + offset*4, jump region of PC + 4, rs) and the
// link value PC + 8 are computed here.
`timescale 1ns/1ps
module tb_branch_unit;
  import mips150_pkg::*;
  br_t br;
  logic [31:0] pc, instr, rs, rt, target, link;
  logic taken;
  int checks = 0, failures = 0;

  branch_unit dut (.br(br), .pc(pc), .instr(instr), .rs_val(rs), .rt_val(rt),
                   .taken(taken), .target(target), .link(link));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      logic        exp_t;
      logic [31:0] exp_tg;
      int sel;
      br    = br_t'($urandom_range(0, int'(BR_JR)));
      pc    = {$urandom} & 32'hffff_fffc;
      instr = $urandom;
      sel   = int'($urandom_range(0, 4));
      rs    = sel == 0 ? 32'h0 : sel == 1 ? 32'hffff_fff0 : sel == 2 ? 32'h5 : $urandom;
      rt    = $urandom_range(0, 1) ? rs : $urandom;
      #1;
      exp_tg = pc + 4 + 32'($signed(instr[15:0]) * 4);
      case (br)
        BR_BEQ:  exp_t = rs == rt;
        BR_BNE:  exp_t = rs != rt;
        BR_BLEZ: exp_t = $signed(rs) <= 0;
        BR_BGTZ: exp_t = $signed(rs) > 0;
        BR_BLTZ: exp_t = $signed(rs) < 0;
        BR_BGEZ: exp_t = $signed(rs) >= 0;
        BR_J:    begin exp_t = 1; exp_tg = ((pc + 4) & 32'hf000_0000) | {4'h0, instr[25:0], 2'b00}; end
        BR_JR:   begin exp_t = 1; exp_tg = rs; end
        default: exp_t = 0;
      endcase
      checks += 2;
      if (taken !== exp_t) begin failures++; $display("FAIL %s taken=%b rs=%h rt=%h", br.name(), taken, rs, rt); end
      if (link !== pc + 8) begin failures++; $display("FAIL link"); end
      if (exp_t) begin
        checks++;
        if (target !== exp_tg) begin failures++; $display("FAIL %s target=%h exp %h", br.name(), target, exp_tg); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
