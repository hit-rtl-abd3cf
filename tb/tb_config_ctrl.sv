// tb_config_ctrl: checks the reconfiguration controller. For random mode
// requests it checks that busy stays high for exactly RECONF_CYCLES cycles,
// that the Local Buffer clear pulse comes in the first of them, that all
// enables are off while busy, and that afterwards the mode and the enable
// flags are those the mode needs (worked out here from the mode table:
// HSparse uses PIDU, routers and Local Buffer, compressed only for HS x HS;
// MSparse uses PIDU, Local Buffer and broadcast; dense only the systolic links).
module tb_config_ctrl;
  import hit_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cfg_valid = 1'b0; mode_e cfg_mode = MODE_HS_COMP;
  logic busy, lb_clear, switched; mode_e mode; gate_t gate;
  int checks = 0, failures = 0;

  config_ctrl #(.RECONF_CYCLES(4)) dut (.clk, .rst_n, .cfg_valid, .cfg_mode, .busy, .mode, .gate, .lb_clear, .switched);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [5:0] want(input mode_e m);
    // {pidu, router, lb, compressed, systolic, bcast}
    case (m)
      MODE_HS_COMP:   return 6'b111100;
      MODE_HS_DIRECT: return 6'b111000;
      MODE_MS:        return 6'b101001;
      default:        return 6'b000010;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && mode == MODE_HS_COMP && gate == want(MODE_HS_COMP), "reset state");
    for (int i = 0; i < 200; i++) begin
      mode_e m;
      int n;
      m = mode_e'($urandom % 4);
      cfg_valid = 1'b1; cfg_mode = m;
      @(negedge clk);
      cfg_valid = 1'b0;
      chk(lb_clear, "clear pulse");
      n = 0;
      while (busy) begin
        chk(gate == '0, "gates off while busy");
        n++;
        @(negedge clk);
        chk(!lb_clear, "single clear pulse");
      end
      chk(n == 4, "reconfiguration length");
      chk(mode == m && gate == want(m), "mode and gates");
      chk(switched, "switched pulse");
      repeat (1 + $urandom % 3) @(negedge clk);
      chk(!switched && mode == m, "mode held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
