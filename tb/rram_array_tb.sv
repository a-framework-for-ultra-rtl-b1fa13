// Testbench of the rram_array behavioural model: random cells are written to
// HRS, LRS1 or LRS2; both comparator reads must report the written states,
// unselected cells must keep theirs, writes while unpowered must have no
// effect and the contents must survive a power-off (non-volatility).
module rram_array_tb;
  import afib_pkg::*;
  logic pwr_en = 0;
  rram_op_e operation = OP_IDLE;
  logic [31:0] cell_sel = 0, comp_out;
  int checks = 0, failures = 0;
  int st[32];

  rram_array dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read();
    pwr_en = 1; operation = OP_READ_A; cell_sel = '1; #10;
    for (int i = 0; i < 32; i++) begin checks++; if (comp_out[i] != (st[i] != 0)) failures++; end
    operation = OP_READ_B; #10;
    for (int i = 0; i < 32; i++) begin checks++; if (comp_out[i] != (st[i] == 2)) failures++; end
    operation = OP_IDLE; #10;
    checks++; if (comp_out != 0) failures++;
  endtask

  initial begin
    for (int i = 0; i < 32; i++) st[i] = 0;
    check_read();
    for (int r = 0; r < 20; r++) begin
      rram_op_e op;
      int s;
      automatic logic [31:0] sel = $urandom;
      case ($urandom_range(2)) 0: begin op = OP_WR_HRS; s = 0; end
                               1: begin op = OP_WR_LRS1; s = 1; end
                               default: begin op = OP_WR_LRS2; s = 2; end endcase
      pwr_en = (r % 5 != 4);
      cell_sel = sel; #5 operation = op; #10 operation = OP_IDLE; cell_sel = 0; #5;
      if (pwr_en) for (int i = 0; i < 32; i++) if (sel[i]) st[i] = s;
      pwr_en = 0; #10;
      checks++; if (comp_out != 0) failures++;   // unpowered: no read
      check_read();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
