// Self-checking test of the circular diagnosis engine. It replays the
// document's six-RUT worked example (ORAs 12..61 = 0,1,0,1,0,0 gives RUTs 3
// and 4 faulty, the rest fault-free, unique diagnosis) and then random fault
// sets, comparing against an independent software version of the tabular
// procedure. It also checks the ORA-inconsistency count and the latency
// bound (at most N+4 cycles from start to done).
module tb_diag_engine;
  import bist_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] ora_fail = '0;
  logic busy, done, unique_diag, reorder;
  rut_status_t [N-1:0] status;
  logic [2:0] inconsistencies;
  int checks = 0, failures = 0;

  diag_engine #(.N(N)) dut (.clk, .rst_n, .start, .ora_fail, .busy, .done, .status,
                            .inconsistencies, .unique_diag, .reorder);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: 0 unknown, 1 good, 2 faulty.
  task automatic ref_diag(input logic [N-1:0] o, output int st[N], output int inc);
    bit chg;
    for (int i = 0; i < N; i++) st[i] = 0;
    for (int j = 0; j < N; j++)
      if (!o[j] && !o[(j + 1) % N]) begin
        st[j] = 1; st[(j + 1) % N] = 1; st[(j + 2) % N] = 1;
      end
    do begin
      int nx[N];
      chg = 0;
      nx = st;
      for (int j = 0; j < N; j++) begin
        int a = j, b = (j + 1) % N;
        if (st[a] != 0 && st[b] == 0 && ((st[a] == 2) ^ o[j])) nx[b] = 2;
        if (st[b] != 0 && st[a] == 0 && ((st[b] == 2) ^ o[j])) nx[a] = 2;
      end
      if (nx != st) chg = 1;
      st = nx;
    end while (chg);
    inc = 0;
    for (int j = 0; j < N; j++) if (o[j] && st[j] == 1 && st[(j + 1) % N] == 1) inc++;
  endtask

  task automatic run_one(input logic [N-1:0] o);
    int st[N], inc, cyc;
    bit uq;
    ref_diag(o, st, inc);
    @(negedge clk); ora_fail = o; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > N + 4) begin failures++; $display("latency %0d for %b", cyc, o); end
    uq = 1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(status[i]) != st[i]) begin
        failures++; $display("ora=%b rut%0d status %0d exp %0d", o, i, status[i], st[i]);
      end
      if (st[i] == 0) uq = 0;
    end
    checks += 3;
    if (inconsistencies != 3'(inc)) begin failures++; $display("inc %0d exp %0d", inconsistencies, inc); end
    if (unique_diag != uq) begin failures++; $display("unique wrong for %b", o); end
    if (reorder != (!uq || inc > 1)) begin failures++; $display("reorder wrong for %b", o); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // Document example: ORA j lies between RUT j and RUT j+1 (0-based).
    run_one(6'b001010);
    checks += 2;
    if (status !== {ST_GOOD, ST_GOOD, ST_FAULTY, ST_FAULTY, ST_GOOD, ST_GOOD}) begin
      failures++; $display("worked example gave %p", status);
    end
    if (!unique_diag) begin failures++; $display("worked example not unique"); end
    // One faulty RUT 2: ORAs 1 and 2 fail.
    run_one(6'b000110);
    checks++;
    if (status[2] != ST_FAULTY || status[1] != ST_GOOD || status[3] != ST_GOOD) begin
      failures++; $display("single fault misdiagnosed %p", status);
    end
    // Isolated failing ORA: one inconsistency.
    run_one(6'b000001);
    checks++;
    if (inconsistencies != 1) begin failures++; $display("inconsistency not seen"); end
    for (int i = 0; i < 64; i++) run_one(6'(i));
    for (int i = 0; i < 200; i++) run_one(6'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
