// BIST sequencer: the control program that the embedded processor runs,
// cast as a state machine.
//
// It runs five test sessions, one resource type after another: PLB session
// 0 (even PLBs under test), PLB session 1 (roles swapped), the LUT RAM
// session (64x1, 32x1, 16x2 dual-port), the block RAM session (BR_CONFIGS
// March configurations) and the DSP session (DSP_CONFIGS attribute sets).
// For each session it
//   - clears the ORAs of the ring under test (the fresh download of the
//     BIST configuration),
//   - in the PLB sessions, optionally runs a sanity check: one configuration
//     with an emulated configuration-bit fault in the first RUT, which must
//     make an ORA fail; the ORAs are then cleared again,
//   - applies the BIST configurations one after another (N_CONFIGS for
//     PLBs, LR_CONFIGS for LUT RAMs, BR_CONFIGS for block RAMs, DSP_CONFIGS
//     for DSPs). Between configurations only the RUTs' mode changes
//     (plb_cfg_for, lr_mode, bram_test_for, dsp_cfg), the RUTs and TPGs
//     restart, and the ORAs keep what they latched,
//   - retrieves the ORA results and runs the diagnosis either after every
//     configuration (defer = 0: best resolution, the failing mode is known) or
//     once at the end of the session (defer = 1: fewer readbacks, only the
//     faulty RUT is known).
// The order of these steps follows the document's BIST procedure; the
// handshakes, the sanity-check fault location and the cycle counts below are
// this design's choices.
//
// Timing of one configuration: 1 reconfiguration cycle (TPG clear and RUT
// reset of the active ring), then the run: PATTERNS cycles for PLBs, or
// until the ring's TPG reports done (lr_done, br_done, dsp_done), one
// cycle more being spent on seeing done. Then 1 drain cycle with the ORAs
// still enabled so that registered outputs of the last step are compared.
// A retrieval pulses diag_start and waits for diag_done, then pulses
// result_valid for one cycle with result_res / result_session / result_cfg
// describing what the diagnosis outputs refer to (for a deferred retrieval
// result_cfg is the session's last configuration). done stays high after
// the last session until the next start; start is ignored while busy.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned N_RUT     = 6,
  parameter int unsigned N_CONFIGS = PLB_CONFIGS,
  parameter int unsigned PATTERNS  = 1 << TPG_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         defer,
  input  logic                         sanity_en,
  // Fault to emulate during the real PLB configurations (cells + LUT bit).
  input  logic [2*N_RUT-1:0]           user_fault_cells,
  input  fault_t                       user_fault,
  // To the PLB BIST array.
  output logic                         session,
  output plb_cfg_t                     cfg,
  output logic                         tpg_clr,
  output logic                         run,
  output logic                         rut_rst,
  output logic                         ora_clr,
  output logic                         ora_en,
  output logic [2*N_RUT-1:0]           fault_cells,
  output fault_t                       fault,
  input  logic [N_RUT-1:0]             ora_fail,
  // Resource type of the current session.
  output res_t                         res,
  // To the LUT RAM BIST array.
  output lr_mode_t                     lr_mode,
  output logic                         lr_tpg_clr,
  output logic                         lr_run,
  output logic                         lr_ora_clr,
  output logic                         lr_ora_en,
  input  logic                         lr_done,
  // To the block RAM BIST array.
  output bram_test_t                   br_test,
  output logic                         br_tpg_clr,
  output logic                         br_run,
  output logic                         br_ora_clr,
  output logic                         br_ora_en,
  input  logic                         br_done,
  // To the DSP BIST array.
  output logic [1:0]                   dsp_cfg,
  output logic                         dsp_tpg_clr,
  output logic                         dsp_run,
  output logic                         dsp_ora_clr,
  output logic                         dsp_ora_en,
  input  logic                         dsp_done,
  // To the diagnosis engine.
  output logic                         diag_start,
  input  logic                         diag_done,
  // Status.
  output logic                         busy,
  output logic                         done,
  output logic                         result_valid,
  output logic                         result_session,
  output res_t                         result_res,
  output logic [$clog2(N_CONFIGS)-1:0] result_cfg,
  output logic [1:0]                   sanity_ok,
  output logic [15:0]                  configs_applied,
  output logic [15:0]                  retrievals
);
  typedef enum logic [3:0] {
    C_IDLE, C_SESSION, C_RECONF, C_RUN, C_DRAIN, C_SANITY_CHK,
    C_DIAG_START, C_DIAG_WAIT, C_NEXT, C_DONE
  } cstate_t;

  localparam int unsigned CW = $clog2(N_CONFIGS);

  cstate_t                         state;
  logic [CW-1:0]                   cfg_idx;
  logic [$clog2(PATTERNS+1)-1:0]   pat_cnt;
  logic                            in_sanity;
  logic                            defer_q, sanity_q;
  logic                            last_cfg, run_end;
  logic                            plb, lr, br, dsp;
  logic                            s_clr, s_reconf, s_run, s_cmp;

  assign plb      = (res == RES_PLB);
  assign lr       = (res == RES_LUTRAM);
  assign br       = (res == RES_BRAM);
  assign dsp      = (res == RES_DSP);
  assign s_clr    = (state == C_SESSION);
  assign s_reconf = (state == C_RECONF);
  assign s_run    = (state == C_RUN);
  assign s_cmp    = (state == C_RUN) || (state == C_DRAIN);

  assign cfg        = plb_cfg_for(in_sanity ? 0 : int'(cfg_idx));
  assign run        = plb && s_run;
  assign ora_en     = plb && s_cmp;
  assign tpg_clr    = plb && s_reconf;
  assign rut_rst    = plb && s_reconf;
  assign ora_clr    = plb && (s_clr || (state == C_SANITY_CHK));
  assign lr_mode    = lr_mode_t'(lr ? cfg_idx[1:0] : 2'd0);
  assign lr_run     = lr && s_run;
  assign lr_ora_en  = lr && s_cmp;
  assign lr_tpg_clr = lr && s_reconf;
  assign lr_ora_clr = lr && s_clr;
  assign br_test    = bram_test_for(br ? int'(cfg_idx) : 0);
  assign br_run     = br && s_run;
  assign br_ora_en  = br && s_cmp;
  assign br_tpg_clr = br && s_reconf;
  assign br_ora_clr = br && s_clr;
  assign dsp_cfg     = dsp ? cfg_idx[1:0] : 2'd0;
  assign dsp_run     = dsp && s_run;
  assign dsp_ora_en  = dsp && s_cmp;
  assign dsp_tpg_clr = dsp && s_reconf;
  assign dsp_ora_clr = dsp && s_clr;

  assign diag_start = (state == C_DIAG_START);
  assign busy       = (state != C_IDLE) && (state != C_DONE);
  assign done       = (state == C_DONE);

  always_comb begin
    unique case (res)
      RES_LUTRAM: begin
        last_cfg = (cfg_idx == CW'(LR_CONFIGS - 1));
        run_end  = lr_done;
      end
      RES_BRAM: begin
        last_cfg = (cfg_idx == CW'(BR_CONFIGS - 1));
        run_end  = br_done;
      end
      RES_DSP: begin
        last_cfg = (cfg_idx == CW'(DSP_CONFIGS - 1));
        run_end  = dsp_done;
      end
      default: begin
        last_cfg = (cfg_idx == CW'(N_CONFIGS - 1));
        run_end  = (pat_cnt == ($clog2(PATTERNS+1))'(PATTERNS - 1));
      end
    endcase
  end

  // The sanity fault goes into the first RUT of the session (cell = session).
  always_comb begin
    if (in_sanity) begin
      fault_cells = (2*N_RUT)'(session ? 2 : 1);
      fault       = '{en: 1'b1, lut: 3'd0, bit_idx: 4'd0};
    end else begin
      fault_cells = user_fault_cells;
      fault       = user_fault;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= C_IDLE;
      session         <= 1'b0;
      res             <= RES_PLB;
      cfg_idx         <= '0;
      pat_cnt         <= '0;
      in_sanity       <= 1'b0;
      defer_q         <= 1'b0;
      sanity_q        <= 1'b0;
      sanity_ok       <= '0;
      result_valid    <= 1'b0;
      result_session  <= 1'b0;
      result_res      <= RES_PLB;
      result_cfg      <= '0;
      configs_applied <= '0;
      retrievals      <= '0;
    end else begin
      result_valid <= 1'b0;
      unique case (state)
        C_IDLE, C_DONE: if (start) begin
          defer_q         <= defer;
          sanity_q        <= sanity_en;
          session         <= 1'b0;
          res             <= RES_PLB;
          sanity_ok       <= '0;
          configs_applied <= '0;
          retrievals      <= '0;
          state           <= C_SESSION;
        end
        C_SESSION: begin           // ORAs cleared this cycle
          cfg_idx   <= '0;
          in_sanity <= sanity_q && plb;
          state     <= C_RECONF;
        end
        C_RECONF: begin
          pat_cnt <= '0;
          state   <= C_RUN;
        end
        C_RUN: begin
          pat_cnt <= pat_cnt + 1'b1;
          if (run_end) state <= C_DRAIN;
        end
        C_DRAIN: begin
          if (in_sanity) begin
            state <= C_SANITY_CHK;
          end else begin
            configs_applied <= configs_applied + 1'b1;
            state <= (!defer_q || last_cfg) ? C_DIAG_START : C_NEXT;
          end
        end
        C_SANITY_CHK: begin        // ORAs cleared this cycle
          sanity_ok[session] <= |ora_fail;
          in_sanity          <= 1'b0;
          state              <= C_RECONF;
        end
        C_DIAG_START: state <= C_DIAG_WAIT;
        C_DIAG_WAIT: if (diag_done) begin
          result_valid   <= 1'b1;
          result_session <= session;
          result_res     <= res;
          result_cfg     <= cfg_idx;
          retrievals     <= retrievals + 1'b1;
          state          <= C_NEXT;
        end
        C_NEXT: begin
          if (!last_cfg) begin
            cfg_idx <= cfg_idx + 1'b1;
            state   <= C_RECONF;
          end else if (plb && !session) begin
            session <= 1'b1;
            state   <= C_SESSION;
          end else if (plb) begin
            res   <= RES_LUTRAM;
            state <= C_SESSION;
          end else if (lr) begin
            res   <= RES_BRAM;
            state <= C_SESSION;
          end else if (br) begin
            res   <= RES_DSP;
            state <= C_SESSION;
          end else begin
            state <= C_DONE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
