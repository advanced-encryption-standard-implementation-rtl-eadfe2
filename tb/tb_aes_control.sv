// tb_aes_control: cycle-by-cycle check of the control unit against the
// state table. For every cycle the expected state is tracked by the
// testbench (S0 idle until start, S1, eight S2 cycles, S3, back to S0) and
// the register enables, mux selects, key address, busy and done are
// compared. Checks the 11-cycle encryption latency (start cycle to the
// done pulse), waiting in S0, and back-to-back runs with start held high.
module tb_aes_control;
  logic clk = 0, rst_n = 0, start = 0;
  logic en_reg1, en_reg2, sel_mux1, sel_mux2, done, busy;
  logic [3:0] key_addr;
  int checks = 0, failures = 0;
  int runs = 0;

  aes_control dut (.*);

  always #5 clk = ~clk;

  // Expected outputs for tracked state st (0..3) and round index n in S2.
  task automatic check_outputs(int st, int n, bit exp_done);
    logic [3:0] ea;
    logic e1, e2, m1, m2;
    case (st)
      0: begin e1 = 1; e2 = 0; m1 = 0; m2 = 0; ea = 4'b1111; end
      1: begin e1 = 0; e2 = 1; m1 = 0; m2 = 0; ea = 4'b1110; end
      2: begin e1 = 0; e2 = 1; m1 = 1; m2 = 0; ea = 4'(n);   end
      default: begin e1 = 0; e2 = 1; m1 = 1; m2 = 1; ea = 4'b1000; end
    endcase
    checks++;
    if ({en_reg1, en_reg2, sel_mux1, sel_mux2, key_addr, busy, done} !==
        {e1, e2, m1, m2, ea, logic'(st != 0), exp_done}) begin
      failures++;
      $display("FAIL t=%0t st=%0d n=%0d got %b%b%b%b %b busy=%b done=%b", $time, st, n,
               en_reg1, en_reg2, sel_mux1, sel_mux2, key_addr, busy, done);
    end
  endtask

  int st = 0, n = 0, start_cycle = 0, cycle = 0;
  bit exp_done = 0;

  // Model and check on the falling edge; inputs change there too.
  task automatic step(bit s);
    start = s;
    @(negedge clk);
    cycle++;
  endtask

  always @(negedge clk) if (rst_n) begin
    check_outputs(st, n, exp_done);
    exp_done = 0;
    case (st)
      0: if (start) begin st = 1; start_cycle = cycle; end
      1: begin st = 2; n = 0; end
      2: if (n == 7) st = 3; else n++;
      default: begin
        st = 0; n = 0; exp_done = 1; runs++;
        checks++;
        if (cycle - start_cycle != 10) begin
          failures++; $display("FAIL latency %0d", cycle - start_cycle + 1);
        end
      end
    endcase
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) step(0);            // idle in S0
    step(1);                       // single start pulse
    repeat (15) step(0);
    repeat (40) step(1);           // back-to-back runs
    repeat (3) step(0);
    rst_n = 0;                     // reset in the middle of a run
    step(1); rst_n = 1; st = 0; n = 0; exp_done = 0;
    repeat (4) step(0);
    checks++;
    if (runs < 4) begin failures++; $display("FAIL only %0d runs", runs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
