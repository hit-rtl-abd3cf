// config_ctrl: dataflow switching controller.
//
// The dataflow is chosen once per workload by the host (HSparse with
// compressed or direct output storage, MSparse, or the dense systolic
// inner product). A request on cfg_valid, accepted while the controller is
// not busy, runs a fixed sequence of RECONF_CYCLES cycles whatever the
// matrix size: all units are disabled, the Local Buffers of every Row are
// cleared in the first cycle (Row initialisation), and in the last cycle the
// new mode's enable flags are raised. Those flags select the datapaths and
// stand for the clock gates of the sparsity units and the power gate of the
// Local Buffer:
//   HS_COMP   PIDU, routers, Local Buffer, binning
//   HS_DIRECT PIDU, routers, Local Buffer
//   MS        PIDU, Local Buffer, broadcast (routers gated)
//   DENSE     systolic links only
// The fixed-length sequence follows the design; its length is this
// implementation's choice.
module config_ctrl
  import hit_pkg::*;
#(
  parameter int unsigned RECONF_CYCLES = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cfg_valid,
  input  mode_e cfg_mode,
  output logic  busy,
  output mode_e mode,
  output gate_t gate,
  output logic  lb_clear,
  output logic  switched      // one-cycle pulse at the end of a reconfiguration
);
  logic [$clog2(RECONF_CYCLES+1)-1:0] cnt;
  mode_e next_mode;

  function automatic gate_t gates_of(input mode_e m);
    gate_t g;
    g = '0;
    case (m)
      MODE_HS_COMP:   begin g.pidu_en = 1'b1; g.router_en = 1'b1; g.lb_en = 1'b1; g.compressed = 1'b1; end
      MODE_HS_DIRECT: begin g.pidu_en = 1'b1; g.router_en = 1'b1; g.lb_en = 1'b1; end
      MODE_MS:        begin g.pidu_en = 1'b1; g.lb_en = 1'b1; g.bcast_en = 1'b1; end
      MODE_DENSE:     begin g.systolic_en = 1'b1; end
      default:        g = '0;
    endcase
    return g;
  endfunction

  assign busy = (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      mode      <= MODE_HS_COMP;
      next_mode <= MODE_HS_COMP;
      gate      <= gates_of(MODE_HS_COMP);
      lb_clear  <= 1'b0;
      switched  <= 1'b0;
    end else begin
      lb_clear <= 1'b0;
      switched <= 1'b0;
      if (!busy && cfg_valid) begin
        cnt       <= $clog2(RECONF_CYCLES+1)'(RECONF_CYCLES);
        next_mode <= cfg_mode;
        gate      <= '0;
        lb_clear  <= 1'b1;
      end else if (busy) begin
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          mode     <= next_mode;
          gate     <= gates_of(next_mode);
          switched <= 1'b1;
        end
      end
    end
  end
endmodule
