// write_out_buffer_tb: offers random column batches (random valid bits,
// addresses from a small set so that runs of equal addresses occur) and
// random pops to a BATCH=4, DEPTH=8, WIN=4 buffer, and compares can_accept,
// the stall flag, the ejection window and the run length with a queue model.
// A directed part pushes a run of 7 equal addresses and checks that it is
// folded into ejections of 4 and 3.
module write_out_buffer_tb;
  import sa_pkg::*;

  localparam int BATCH = 4, DEPTH = 8, WIN = 4;
  logic   clk = 0, rst_n = 0, push = 0, pop = 0;
  entry_t in_entry [BATCH];
  logic   in_valid [BATCH];
  logic   can_accept, stall_req;
  entry_t win [WIN];
  logic [$clog2(WIN+1)-1:0] run_len;
  logic [$clog2(DEPTH+1)-1:0] count;
  entry_t q [$];
  int     checks = 0, failures = 0, stalls = 0, folds = 0;

  write_out_buffer #(.BATCH(BATCH), .DEPTH(DEPTH), .WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_run();
    int n = 0;
    while (n < WIN && n < q.size() && q[n].addr == q[0].addr) n++;
    return n;
  endfunction

  task automatic expect_eq(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp_v, $time);
    end
  endtask

  // Compare the combinational outputs with the model, then apply one edge.
  task automatic step(input bit want_push, input bit do_pop);
    int n_in = 0, r;
    for (int i = 0; i < BATCH; i++) if (in_valid[i]) n_in++;
    #1;
    expect_eq(int'(can_accept), int'(DEPTH - q.size() >= n_in), "can_accept");
    expect_eq(int'(stall_req), int'(DEPTH - q.size() < n_in), "stall_req");
    expect_eq(int'(count), q.size(), "count");
    r = model_run();
    expect_eq(int'(run_len), r, "run_len");
    for (int j = 0; j < r; j++) begin
      checks++;
      if (win[j] !== q[j]) begin
        failures++;
        if (failures < 10) $display("FAIL window %0d: got %h expected %h", j, win[j], q[j]);
      end
    end
    if (want_push && !can_accept) stalls++;
    push = want_push && can_accept;
    pop  = do_pop;
    @(posedge clk);
    if (do_pop) begin
      if (r == WIN && q.size() > WIN && q[WIN].addr == q[0].addr) folds++;
      for (int j = 0; j < r; j++) void'(q.pop_front());
    end
    if (push)
      for (int i = 0; i < BATCH; i++) if (in_valid[i]) q.push_back(in_entry[i]);
    @(negedge clk);
    push = 0;
    pop  = 0;
  endtask

  initial begin
    for (int i = 0; i < BATCH; i++) begin in_entry[i] = '0; in_valid[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Directed: 7 values for address 1 in two batches, folded 4 + 3.
    for (int i = 0; i < BATCH; i++) begin
      in_entry[i] = '{value: 32'(i + 1), addr: 20'h1};
      in_valid[i] = 1;
    end
    step(1, 0);
    in_valid[3] = 0;
    step(1, 0);
    for (int i = 0; i < BATCH; i++) in_valid[i] = 0;
    expect_eq(int'(run_len), 4, "folded first part");
    step(0, 1);
    expect_eq(int'(run_len), 3, "folded second part");
    step(0, 1);
    expect_eq(int'(count), 0, "empty after folding");
    // Random traffic.
    for (int cyc = 0; cyc < 5000; cyc++) begin
      for (int i = 0; i < BATCH; i++) begin
        in_valid[i] = ($urandom_range(3) != 0);
        in_entry[i] = '{value: $urandom, addr: 20'($urandom_range(2))};
      end
      step($urandom_range(1), ($urandom_range(2) == 0));
    end
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    if (folds == 0)  begin failures++; $display("FAIL no fold seen"); end
    $display("stalls=%0d folds=%0d", stalls, folds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
