// tb_pic_alu: random operands for every ALU operation compared with a reference computed
// here in integer arithmetic (PIC carry/borrow conventions, digit carry out of bit 3).
module tb_pic_alu;
  import repic_pkg::*;
  alu_op_e op;
  logic [7:0] a, b, y;
  logic cin, c, dc, z;
  logic [2:0] bitsel;
  int checks = 0, failures = 0;

  pic_alu dut (.op, .a, .b, .cin, .bitsel, .y, .c, .dc, .z);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ia, ib, ey, ec, edc;
      op = alu_op_e'($urandom % 16);
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom); bitsel = 3'($urandom);
      if (n < 16) begin a = 8'h0F; b = 8'h01; end
      ia = int'(a); ib = int'(b);
      ec = int'(cin); edc = -1;
      unique case (op)
        ALU_ADD: begin ey = ia + ib; ec = ey > 255; edc = ((ia % 16) + (ib % 16)) > 15; end
        ALU_SUB: begin ey = ib - ia; ec = ib >= ia; edc = (ib % 16) >= (ia % 16); end
        ALU_AND: ey = ia & ib;
        ALU_IOR: ey = ia | ib;
        ALU_XOR: ey = ia ^ ib;
        ALU_PASSA: ey = ia;
        ALU_PASSB: ey = ib;
        ALU_COMB: ey = 255 - ib;
        ALU_INCB: ey = ib + 1;
        ALU_DECB: ey = ib - 1;
        ALU_RRF:  begin ey = ib / 2 + 128 * int'(cin); ec = ib % 2; end
        ALU_RLF:  begin ey = ib * 2 + int'(cin); ec = ib / 128; end
        ALU_SWAP: ey = (ib % 16) * 16 + ib / 16;
        ALU_ZERO: ey = 0;
        ALU_BCLR: ey = ib & (255 - (1 << bitsel));
        ALU_BSET: ey = ib | (1 << bitsel);
      endcase
      ey = ey & 255;
      #1;
      checks++;
      if (y !== 8'(ey) || c !== 1'(ec) || z !== (ey == 0) || (edc >= 0 && dc !== 1'(edc))) begin
        failures++;
        $display("FAIL %s a=%h b=%h cin=%b -> y=%h c=%b dc=%b z=%b exp y=%h c=%0d dc=%0d",
                 op.name(), a, b, cin, y, c, dc, z, ey, ec, edc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
