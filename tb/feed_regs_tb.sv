// feed_regs_tb: presents random words on every lane with random holds and
// checks that lane i delivers, after each enabled edge, the word that was
// accepted i+1 enabled edges earlier (the skew), with its valid bit.
module feed_regs_tb;
  import sa_pkg::*;

  localparam int L = 5;
  logic  clk = 0, rst_n = 0, en = 1;
  fp32_t d_in [L], d_out [L];
  logic  v_in [L], v_out [L];
  fp32_t hist_d [$][L];
  logic  hist_v [$][L];
  int    checks = 0, failures = 0;

  feed_regs #(.LANES(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t zd [L];
    logic  zv [L];
    for (int i = 0; i < L; i++) begin
      d_in[i] = '0; v_in[i] = 0; zd[i] = '0; zv[i] = 0;
    end
    // The history starts with the reset state of every stage.
    for (int s = 0; s < L; s++) begin
      hist_d.push_front(zd);
      hist_v.push_front(zv);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      for (int i = 0; i < L; i++) begin
        v_in[i] = $urandom_range(1);
        d_in[i] = $urandom;
      end
      @(posedge clk);
      if (en) begin
        fp32_t nd [L];
        logic  nv [L];
        for (int i = 0; i < L; i++) begin
          nd[i] = v_in[i] ? d_in[i] : '0;
          nv[i] = v_in[i];
        end
        hist_d.push_front(nd);
        hist_v.push_front(nv);
      end
      #1;
      for (int i = 0; i < L; i++) begin
        checks++;
        if (d_out[i] !== hist_d[i][i] || v_out[i] !== hist_v[i][i]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d: got %h/%b expected %h/%b", i, d_out[i], v_out[i], hist_d[i][i], hist_v[i][i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
