// tb_net_control: drives the command handshake and plays the network
// (the OR chain and the label checker) for the sequencer. For each command
// it checks the number of clocks the command takes, the phase of every
// basic cycle, the ring and coder controls, and the status outputs:
// net_ready, CODEvalid, timeout, end_learn and the retry count of RECALL.
module tb_net_control;
  import fbnn_pkg::*;
  localparam int N = 64, MAX_ITER = 32, ANNEAL = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0] cmd = 0;
  logic cmd_req = 0, cmd_ack, cnv, label_match;
  phase_e phase;
  logic run, first, last, ring_shift, ring_sel_code, ring_commit, coder_start, noise_en;
  logic check_step, capture, net_ready, end_learn, code_valid, busy, timeout;
  logic [1:0] retries;
  int checks = 0, failures = 0;

  // network behaviour played by the testbench
  int cold_needed = 1;        // cold cycles with changes before a stable one
  int cold_seen = 0;          // cold cycles seen in the current attempt
  int good_attempt = 99;      // attempt (0 = first) whose label matches
  int attempt = 0;
  logic learn_null = 1;
  // observations
  int n_run, n_load, n_relax, n_noisy, n_pot, n_upd, n_clear, n_commit, n_start, n_capture;

  net_control dut (.*);
  always #5 clk = ~clk;
  initial begin #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  assign cnv = (phase == PH_POT) ? !learn_null : (cold_seen < cold_needed);
  assign label_match = (attempt == good_attempt);

  always @(posedge clk) if (rst_n) begin
    if (run) n_run++;
    if (phase == PH_LOAD)  n_load++;
    if (phase == PH_RELAX && !noise_en) n_relax++;
    if (phase == PH_RELAX && noise_en) n_noisy++;
    if (phase == PH_POT)   n_pot++;
    if (phase == PH_UPD)   n_upd++;
    if (phase == PH_CLEAR) n_clear++;
    if (ring_commit) n_commit++;
    if (coder_start) begin n_start++; end
    if (capture) n_capture++;
    // rules that hold in every clock
    if (ring_sel_code != (phase == PH_LOAD)) failures++;
    if (ring_shift != (phase inside {PH_LOAD, PH_RELAX, PH_POT, PH_UPD})) failures++;
    if (phase == PH_RELAX && !noise_en && last) cold_seen <= cold_seen + 1;
    if (coder_start && phase == PH_RELAX) begin attempt <= attempt + 1; cold_seen <= 0; end
  end

  task automatic issue(cmd_e c, int exp_clocks);
    n_run = 0; n_load = 0; n_relax = 0; n_noisy = 0; n_pot = 0; n_upd = 0;
    n_clear = 0; n_commit = 0; n_start = 0; n_capture = 0;
    cmd = c; cmd_req = 1;
    do @(posedge clk); while (!cmd_ack);
    #1 cmd_req = 0;
    @(posedge clk); #1;
    checks++;
    if (cmd_ack) begin failures++; $display("ack not released"); end
    while (busy) @(posedge clk);
    #1 checks++;
    if (n_run != exp_clocks) begin failures++; $display("%s took %0d clocks, exp %0d", c.name(), n_run, exp_clocks); end
  endtask

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s = %0d, exp %0d", what, got, exp_v); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    expect_eq("busy after reset", busy, 0);
    // LOAD: one cycle through the coder
    issue(CMD_LOAD, N);
    expect_eq("load cycles", n_load, N);
    expect_eq("coder starts", n_start, 1);
    expect_eq("captures", n_capture, 1);
    // CLEAR
    issue(CMD_CLEAR, N);
    expect_eq("clear cycles", n_clear, N);
    // RELAX that needs 3 updating cycles with changes, then the extra one
    cold_seen = 0; cold_needed = 3; attempt = 0; good_attempt = 0;
    issue(CMD_RELAX, 4 * N);
    expect_eq("commits", n_commit, 4);
    expect_eq("net_ready", net_ready, 1);
    expect_eq("code_valid", code_valid, 1);
    expect_eq("timeout", timeout, 0);
    // RELAX that settles on a spurious state
    cold_seen = 0; cold_needed = 0; good_attempt = 99;
    issue(CMD_RELAX, N);
    expect_eq("code_valid spurious", code_valid, 0);
    // RELAX that never settles: bounded by MAX_ITER
    cold_seen = 0; cold_needed = 1000; good_attempt = 0;
    issue(CMD_RELAX, MAX_ITER * N);
    expect_eq("timeout", timeout, 1);
    expect_eq("code_valid after timeout", code_valid, 0);
    // ANNEAL: noisy cycles, then two cold ones
    cold_seen = 0; cold_needed = 1;
    issue(CMD_ANNEAL, (ANNEAL + 2) * N);
    expect_eq("noisy basic cycles", n_noisy, ANNEAL * N);
    expect_eq("cold basic cycles", n_relax, 2 * N);
    expect_eq("timeout cleared", timeout, 0);
    // Learning and end_learn
    issue(CMD_EPOCH, 0);
    expect_eq("end_learn before any presentation", end_learn, 0);
    learn_null = 1;
    issue(CMD_LEARN, 2 * N);
    expect_eq("pot cycles", n_pot, N);
    expect_eq("upd cycles", n_upd, N);
    expect_eq("end_learn after null presentation", end_learn, 1);
    expect_eq("net_ready cleared by learn", net_ready, 0);
    learn_null = 0;
    issue(CMD_LEARN, 2 * N);
    learn_null = 1;
    issue(CMD_LEARN, 2 * N);
    expect_eq("end_learn after a non-null presentation", end_learn, 0);
    issue(CMD_EPOCH, 0);
    issue(CMD_LEARN, 2 * N);
    expect_eq("end_learn new epoch", end_learn, 1);
    // RECALL whose label never matches: first try cold, three annealed retries
    cold_seen = 0; cold_needed = 0; attempt = 0; good_attempt = 99;
    issue(CMD_RECALL, 4 * N + N + 3 * (ANNEAL + 1) * N);
    expect_eq("recall loads", n_load, 4 * N);
    expect_eq("recall coder starts", n_start, 4);
    expect_eq("recall noisy", n_noisy, 3 * ANNEAL * N);
    expect_eq("retries", retries, 3);
    expect_eq("recall code_valid", code_valid, 0);
    expect_eq("recall capture", n_capture, 1);
    // RECALL that succeeds on the second attempt (first annealed retry)
    cold_seen = 0; cold_needed = 0; attempt = 0; good_attempt = 1;
    issue(CMD_RECALL, 2 * N + N + (ANNEAL + 1) * N);
    expect_eq("retries", retries, 1);
    expect_eq("recall code_valid", code_valid, 1);
    // RECALL that succeeds cold
    cold_seen = 0; cold_needed = 2; attempt = 0; good_attempt = 0;
    issue(CMD_RECALL, N + 3 * N);
    expect_eq("retries", retries, 0);
    expect_eq("net_ready", net_ready, 1);
    // NOP takes no cycle and leaves net_ready
    issue(CMD_NOP, 0);
    expect_eq("net_ready after nop", net_ready, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
