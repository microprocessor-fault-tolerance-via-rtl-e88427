// rm_freeze_ctrl: pipeline-freezing control of the Reconfiguration Manager.
//
// The ALU error signal drives the pipeline freeze directly, so the first
// erroneous result is never registered. In parallel the controller starts a
// detection window: if the error disappears before the window ends, the fault
// was transient, freeze drops with the error and execution continues on the
// next cycle. If the error is still present after DETECT_CYCLES further
// cycles, the fault is taken as permanent: the controller holds freeze itself
// (so glitches during reconfiguration cannot reach the pipeline registers),
// requests the spare-ALU bitstream (cfg_start_o) and waits for cfg_done_i.
// It then switches the Execute-stage multiplexer to the external ALU
// (select_alu_o = 0), stops listening to the error of the replaced internal
// ALU, and releases freeze.
//
// freeze_o = (error_i and not yet repaired) or (reconfiguration in progress).
// Timing: error sampled high at edge 0 and at every edge up to edge
// DETECT_CYCLES gives cfg_start_o during the cycle after edge DETECT_CYCLES.
// The published design gives the sequence; the window length ("a few clock
// cycles") and ignoring the error after the repair are this design's choices.
module rm_freeze_ctrl #(
  parameter int unsigned DETECT_CYCLES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       error_i,
  input  logic       cfg_done_i,
  output logic       freeze_o,
  output logic       cfg_start_o,    // one-cycle request to load the spare
  output logic       select_alu_o,   // 1 = internal ALU, 0 = external ALU
  output logic       transient_o,    // one-cycle pulse: error went away in time
  output logic [1:0] state_o
);

  typedef enum logic [1:0] {
    S_IDLE     = 2'd0,
    S_DETECT   = 2'd1,
    S_RECONFIG = 2'd2,
    S_REPAIRED = 2'd3
  } state_e;

  localparam int unsigned CW = $clog2(DETECT_CYCLES + 1) + 1;

  state_e        state_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      cnt_q       <= '0;
      cfg_start_o <= 1'b0;
      transient_o <= 1'b0;
    end else begin
      cfg_start_o <= 1'b0;
      transient_o <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (error_i) begin
            state_q <= S_DETECT;
            cnt_q   <= CW'(1);
          end
        end
        S_DETECT: begin
          if (!error_i) begin
            state_q     <= S_IDLE;
            transient_o <= 1'b1;
          end else if (cnt_q >= CW'(DETECT_CYCLES)) begin
            state_q     <= S_RECONFIG;
            cfg_start_o <= 1'b1;
          end else begin
            cnt_q <= cnt_q + CW'(1);
          end
        end
        S_RECONFIG: begin
          if (cfg_done_i) state_q <= S_REPAIRED;
        end
        S_REPAIRED: ;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign freeze_o     = (error_i && state_q != S_REPAIRED) || (state_q == S_RECONFIG);
  assign select_alu_o = (state_q != S_REPAIRED);
  assign state_o      = state_q;

endmodule
