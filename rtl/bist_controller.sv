// bist_controller: sequencer of the multi-cycle BIST session.
//
// After start, each of NUM_PATTERNS patterns is run as CHAIN_LEN shift cycles
// followed by N_SLOW slow captures and N_FAST at-speed captures; lcap marks the
// last capture, where the controllable FFs are filled. The shift of each
// pattern also unloads the previous pattern's response into the scan-out MISR
// (not for the first pattern, whose chains hold no response), and a final
// unload shift follows the last pattern. The capture compactor absorbs the
// observation FFs on capture cycles 2..N, i.e. after captures 1..N-1; the last
// capture's response in those FFs is overwritten by the fill.
// Shift/capture counts follow the test scheme; the state encoding, the unload
// phase, the clear pulse and the compactor timing are this design's choices.
// The slow/fast distinction is only flagged (fast); switching the clock
// frequency is left to the clock source.
//
// Interface: start (pulse or level, sampled in IDLE/DONE) begins a session and
// loads the LFSR seed (lfsr_load); clear zeroes both signatures at the same
// time. busy is high from the cycle after start until done rises.
// Timing: one session is 1 + NUM_PATTERNS*(CHAIN_LEN+N_SLOW+N_FAST) + CHAIN_LEN
// clock cycles from start to done.
module bist_controller
  import lpbist_pkg::*;
#(
  parameter int unsigned CHAIN_LEN    = 100,
  parameter int unsigned N_SLOW       = 10,
  parameter int unsigned N_FAST       = 10,
  parameter int unsigned NUM_PATTERNS = 30000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        lfsr_load,
  output logic        clear,
  output logic        se,
  output logic        lfsr_en,
  output logic        capture,
  output logic        fast,
  output logic        lcap,
  output logic        comp_en,
  output logic        misr_en,
  output logic        busy,
  output logic        done,
  output logic [31:0] pattern
);

  localparam int unsigned N_CAP = N_SLOW + N_FAST;

  typedef enum logic [2:0] {IDLE, SHIFT, CAPT, UNLOAD, FIN} state_e;

  state_e      st;
  logic [31:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      cnt     <= '0;
      pattern <= '0;
    end else begin
      unique case (st)
        IDLE, FIN: if (start) begin
          st      <= SHIFT;
          cnt     <= '0;
          pattern <= '0;
        end
        SHIFT: if (cnt == CHAIN_LEN - 1) begin
          st  <= CAPT;
          cnt <= '0;
        end else cnt <= cnt + 1;
        CAPT: if (cnt == N_CAP - 1) begin
          cnt <= '0;
          if (pattern == NUM_PATTERNS - 1) st <= UNLOAD;
          else begin
            st      <= SHIFT;
            pattern <= pattern + 1;
          end
        end else cnt <= cnt + 1;
        UNLOAD: if (cnt == CHAIN_LEN - 1) begin
          st  <= FIN;
          cnt <= '0;
        end else cnt <= cnt + 1;
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    lfsr_load = (st == IDLE || st == FIN) && start;
    clear     = lfsr_load;
    se        = (st == SHIFT) || (st == UNLOAD);
    lfsr_en   = se;
    capture   = (st == CAPT);
    fast      = capture && (cnt >= N_SLOW);
    lcap      = capture && (cnt == N_CAP - 1);
    comp_en   = capture && (cnt != 0);
    misr_en   = (st == UNLOAD) || (st == SHIFT && pattern != 0);
    busy      = (st != IDLE) && (st != FIN);
    done      = (st == FIN);
  end

  a_lcap_one_hot: assert property (@(posedge clk) disable iff (!rst_n) lcap |-> capture && !se);

endmodule
