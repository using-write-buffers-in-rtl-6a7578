// padded_register_tb: loads random windows with random lengths 0..WIN and
// random holds, and checks that the first len values are kept, the rest
// are zero, the address is the run's address (or all ones when empty) and
// the valid bit is set exactly when len is non-zero.
module padded_register_tb;
  import sa_pkg::*;

  localparam int WIN = 4;
  logic   clk = 0, rst_n = 0, load = 0;
  entry_t win [WIN];
  logic [$clog2(WIN+1)-1:0] len;
  fp32_t  vals [WIN];
  addr_t  addr;
  logic   valid;
  fp32_t  e_vals [WIN];
  addr_t  e_addr;
  logic   e_valid;
  int     checks = 0, failures = 0;

  padded_register #(.WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < WIN; j++) begin win[j] = '0; e_vals[j] = '0; end
    len = '0; e_addr = '1; e_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      load = ($urandom_range(3) != 0);
      len  = 3'($urandom_range(WIN));
      for (int j = 0; j < WIN; j++) win[j] = '{value: $urandom | 32'h1, addr: 20'($urandom)};
      if (load) begin
        for (int j = 0; j < WIN; j++) e_vals[j] = (j < int'(len)) ? win[j].value : 32'd0;
        e_addr  = (len != 0) ? win[0].addr : 20'hFFFFF;
        e_valid = (len != 0);
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < WIN; j++) begin
        checks++;
        if (vals[j] !== e_vals[j]) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d: got %h expected %h", j, vals[j], e_vals[j]);
        end
      end
      checks++;
      if (addr !== e_addr || valid !== e_valid) begin
        failures++;
        if (failures < 10) $display("FAIL addr/valid: got %h/%b expected %h/%b", addr, valid, e_addr, e_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
