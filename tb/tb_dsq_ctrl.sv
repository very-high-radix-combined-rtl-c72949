// tb_dsq_ctrl: runs the sequencer alone through divisions and square roots.
// Checks the latency from the start edge to `done` (3 + ceil(n/b) = 9 and
// 3 + 2 ceil((n-3)/b) = 15 cycles at n = 54, b = 9), the number of digit
// steps, R loads, W-hat loads and M loads per operation, that the first
// square-root digit is selected from 2r*w-hat, and that `start` is ignored
// while busy.
module tb_dsq_ctrl;
  import dsq_pkg::*;
  localparam int N = 54, B = 9;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e op = OP_DIV, op_q;
  ctl_t ctl;
  logic [7:0] j;
  logic busy, done;
  int checks = 0, failures = 0;

  dsq_ctrl #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input op_e o);
    int cyc, ndig, nr, nwh, nm, n2r, nht;
    @(negedge clk);
    op = o; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0; ndig = 0; nr = 0; nwh = 0; nm = 0; n2r = 0; nht = 0;
    while (!done) begin
      if (ctl.q_dig) ndig++;
      if (ctl.ld_r) nr++;
      if (ctl.ld_wh) nwh++;
      if (ctl.ld_m) nm++;
      if (ctl.q_dig && ctl.m3 == M3_2RW) n2r++;
      if (ctl.m5 == M5_HT && ctl.ld_w) nht++;
      if (cyc == 3) start = 1'b1;     // must be ignored
      @(posedge clk);
      #1 cyc++;
      start = 1'b0;
    end
    checks += 7;
    if (o == OP_DIV) begin
      if (cyc != 3 + it_div(N, B)) begin failures++; $display("FAIL div latency %0d", cyc); end
      if (ndig != it_div(N, B))    begin failures++; $display("FAIL div digits %0d", ndig); end
      if (nr != 1)                 begin failures++; $display("FAIL div R loads %0d", nr); end
      if (nwh != 1 + it_div(N, B)) begin failures++; $display("FAIL div W-hat loads"); end
      if (nm != 0)                 begin failures++; $display("FAIL div M loads"); end
      if (n2r != 0)                begin failures++; $display("FAIL div 2rw"); end
      if (nht != 0)                begin failures++; $display("FAIL div cycle B"); end
    end else begin
      if (cyc != 3 + 2 * it_sqrt(N, B)) begin failures++; $display("FAIL sqrt latency %0d", cyc); end
      if (ndig != it_sqrt(N, B))        begin failures++; $display("FAIL sqrt digits"); end
      if (nr != it_sqrt(N, B))          begin failures++; $display("FAIL sqrt R loads"); end
      if (nwh != 1 + it_sqrt(N, B))     begin failures++; $display("FAIL sqrt W-hat loads"); end
      if (nm != 1)                      begin failures++; $display("FAIL sqrt M loads"); end
      if (n2r != 1)                     begin failures++; $display("FAIL sqrt 2rw"); end
      if (nht != it_sqrt(N, B))         begin failures++; $display("FAIL sqrt cycle B"); end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 10; i++) begin
      run(OP_DIV);
      run(OP_SQRT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
