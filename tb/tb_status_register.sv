// tb_status_register: drives each flag source of the status register at
// random and checks the flags against a model kept here, including the
// all-flags load from DB, the pushed byte (bits 5 and 4 set) and the
// branch condition for all eight branch opcodes.
module tb_status_register;
  import cpu_pkg::*;
  logic       clk = 1'b0, rst, ce;
  logic [7:0] ir, sb, db, p;
  logic       acr, avr, z_sb, d_ir5, p_db, fc, fd, brc;
  n_src_t     n_src;
  c_src_t     c_src;
  v_src_t     v_src;
  i_src_t     i_src;
  logic       n, v, d, i, z, c, eb;
  int checks = 0, failures = 0;

  status_register dut (.clk(clk), .rst(rst), .ce(ce), .ir(ir), .sb(sb), .db(db), .acr(acr),
    .avr(avr), .n_src(n_src), .z_sb(z_sb), .c_src(c_src), .v_src(v_src), .i_src(i_src),
    .d_ir5(d_ir5), .p_db(p_db), .p(p), .flag_c(fc), .flag_d(fd), .brc(brc));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ce = 1; ir = 0; sb = 0; db = 0; acr = 0; avr = 0; z_sb = 0; d_ir5 = 0; p_db = 0;
    n_src = FN_NONE; c_src = FC_NONE; v_src = FV_NONE; i_src = FI_NONE;
    @(posedge clk); #1 rst = 0;
    {n, v, d, i, z, c} = 6'b000100;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ir = 8'($urandom); sb = 8'($urandom); db = 8'($urandom);
      if ($urandom_range(3) == 0) sb = 8'h00;
      acr = 1'($urandom); avr = 1'($urandom); z_sb = 1'($urandom); d_ir5 = 1'($urandom);
      p_db = ($urandom_range(7) == 0);
      n_src = n_src_t'($urandom_range(2)); c_src = c_src_t'($urandom_range(2));
      v_src = v_src_t'($urandom_range(3)); i_src = i_src_t'($urandom_range(2));
      ce = ($urandom_range(5) != 0);
      // branch condition from the present flags
      case (ir[7:6])
        2'b00: eb = (n == ir[5]);
        2'b01: eb = (v == ir[5]);
        2'b10: eb = (c == ir[5]);
        default: eb = (z == ir[5]);
      endcase
      #1;
      checks++;
      if (brc !== eb) failures++;
      @(posedge clk); #1;
      if (ce) begin
        if (p_db) begin
          {n, v} = db[7:6]; {d, i, z, c} = db[3:0];
        end else begin
          if (n_src == FN_SB) n = sb[7];
          if (n_src == FN_DB) n = db[7];
          if (z_sb) z = (sb == 0);
          if (c_src == FC_ACR) c = acr;
          if (c_src == FC_IR5) c = ir[5];
          if (v_src == FV_AVR) v = avr;
          if (v_src == FV_CLR) v = 0;
          if (v_src == FV_DB6) v = db[6];
          if (i_src == FI_IR5) i = ir[5];
          if (i_src == FI_SET) i = 1;
          if (d_ir5) d = ir[5];
        end
      end
      checks++;
      if (p !== {n, v, 2'b11, d, i, z, c} || fc !== c || fd !== d) begin
        failures++;
        if (failures < 5) $display("FAIL: p %b want %b", p, {n, v, 2'b11, d, i, z, c});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
