// output_buffer_tb: offers random sets of column results (N_IN = 4) while
// can_accept is high and answers the memory port with a random ready. Checks
// can_accept against the free space of a queue model and that the memory
// receives every result once, in column order within a cycle and in
// arrival order across cycles.
module output_buffer_tb;
  import sa_pkg::*;

  localparam int N_IN = 4, DEPTH = 8;
  logic   clk = 0, rst_n = 0, mem_ready = 0;
  entry_t in_entry [N_IN];
  logic   in_valid [N_IN];
  logic   can_accept, mem_valid;
  entry_t mem_entry;
  logic [$clog2(DEPTH+1)-1:0] count;
  entry_t q [$];
  int     checks = 0, failures = 0, writes = 0, sent = 0;

  output_buffer #(.N_IN(N_IN), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < N_IN; i++) begin in_entry[i] = '0; in_valid[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit offer, popped;
      @(negedge clk);
      mem_ready = $urandom_range(1);
      #1;
      chk(can_accept == (DEPTH - q.size() >= N_IN), "can_accept");
      chk(mem_valid == (q.size() != 0), "mem_valid");
      if (mem_valid && q.size() != 0) chk(mem_entry == q[0], "memory word order");
      offer = can_accept && ($urandom_range(1) == 1);
      for (int i = 0; i < N_IN; i++) begin
        in_valid[i] = offer && ($urandom_range(1) == 1);
        in_entry[i] = '{value: $urandom, addr: 20'($urandom)};
      end
      popped = mem_valid && mem_ready;
      @(posedge clk);
      if (popped) begin
        void'(q.pop_front());
        writes++;
      end
      for (int i = 0; i < N_IN; i++) if (in_valid[i]) begin q.push_back(in_entry[i]); sent++; end
    end
    // Drain: inputs change only at the falling edge.
    @(negedge clk);
    for (int i = 0; i < N_IN; i++) in_valid[i] = 0;
    mem_ready = 1;
    while (q.size() != 0) begin
      #1;
      chk(mem_valid && mem_entry == q[0], "drain order");
      @(posedge clk);
      void'(q.pop_front());
      writes++;
      @(negedge clk);
    end
    chk(!mem_valid && count == 0, "empty after drain");
    chk(writes == sent, "every result written once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
