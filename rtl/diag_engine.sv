// Circular-comparison diagnosis engine.
//
// Given the pass/fail bit of each ORA in a ring (ora_fail[j] = 1 when the ORA
// between RUT j and RUT j+1 mod N saw a mismatch), it fills in a table of RUT
// states exactly as the document's tabular procedure does:
//   1. every RUT starts unknown;
//   2. for every two consecutive passing ORAs (ORA j-1 and ORA j), the three
//      RUTs they observe (j-1, j, j+1) are marked fault-free;
//   3. wherever a known RUT and the ORA next to it form a 0/1 pair (a
//      fault-free RUT beside a failing ORA, or a faulty RUT beside a passing
//      ORA) the unknown RUT on the ORA's other side is marked faulty; this is
//      repeated until nothing changes;
//   4. an ORA that failed although both of its RUTs are fault-free is an
//      inconsistency: one of them points to a faulty ORA or faulty routing,
//      several may mean more than two consecutive RUTs with equivalent faults;
//   5. the diagnosis is unique when no RUT is left unknown.
// reorder is raised when the document asks for the comparison order to be
// changed and the test repeated: more than one inconsistency, or RUTs left
// unknown. The document runs this procedure as software on the embedded
// processor; here it is a small sequential circuit, which is this design's
// choice.
//
// Timing: start (one cycle) samples ora_fail. Step 2 takes one cycle, each
// pass of step 3 one cycle (at most N passes plus one that finds no change),
// step 4 one cycle; done is then held high until the next start.
module diag_engine
  import bist_pkg::*;
#(
  parameter int unsigned N = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [N-1:0]              ora_fail,
  output logic                      busy,
  output logic                      done,
  output rut_status_t [N-1:0]       status,
  output logic [$clog2(N+1)-1:0]    inconsistencies,
  output logic                      unique_diag,
  output logic                      reorder
);
  typedef enum logic [2:0] {S_IDLE, S_STEP2, S_STEP3, S_STEP4, S_DONE} state_t;
  state_t              state;
  logic [N-1:0]        ora_q;
  rut_status_t [N-1:0] st_next;
  logic                changed;
  logic [$clog2(N+1)-1:0] inc_cnt;
  logic                all_known;

  // One pass of step 3 on the current table.
  always_comb begin
    st_next = status;
    for (int j = 0; j < N; j++) begin
      int unsigned a, b;
      a = j;
      b = (j + 1) % N;
      // RUT a known, RUT b unknown, 0/1 pair between RUT a and ORA j.
      if (status[a] != ST_UNKNOWN && status[b] == ST_UNKNOWN &&
          ((status[a] == ST_FAULTY) != ora_q[j]))
        st_next[b] = ST_FAULTY;
      if (status[b] != ST_UNKNOWN && status[a] == ST_UNKNOWN &&
          ((status[b] == ST_FAULTY) != ora_q[j]))
        st_next[a] = ST_FAULTY;
    end
    changed = (st_next != status);
  end

  always_comb begin
    inc_cnt   = '0;
    all_known = 1'b1;
    for (int j = 0; j < N; j++) begin
      if (ora_q[j] && status[j] == ST_GOOD && status[(j + 1) % N] == ST_GOOD)
        inc_cnt = inc_cnt + 1'b1;
      if (status[j] == ST_UNKNOWN) all_known = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= S_IDLE;
      ora_q           <= '0;
      status          <= '{default: ST_UNKNOWN};
      inconsistencies <= '0;
      unique_diag     <= 1'b0;
      reorder         <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          ora_q  <= ora_fail;
          status <= '{default: ST_UNKNOWN};
          state  <= S_STEP2;
        end
        S_STEP2: begin
          // ORA j-1 observes RUT j-1 and RUT j, ORA j RUT j and RUT j+1.
          for (int j = 0; j < N; j++) begin
            if (!ora_q[(j + N - 1) % N] && !ora_q[j]) begin
              status[(j + N - 1) % N] <= ST_GOOD;
              status[j]           <= ST_GOOD;
              status[(j + 1) % N] <= ST_GOOD;
            end
          end
          state <= S_STEP3;
        end
        S_STEP3: begin
          status <= st_next;
          if (!changed) state <= S_STEP4;
        end
        S_STEP4: begin
          inconsistencies <= inc_cnt;
          unique_diag     <= all_known;
          reorder         <= !all_known || (inc_cnt > 1);
          state           <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);
endmodule
