// tb_traffic_shaper: pushes numbered items through the shaper under several
// latency/gap settings with random input gaps and random output stalls.
// Checks order and data, that no item leaves earlier than cfg_latency cycles
// after it entered, that successive items leave at least cfg_gap cycles
// apart, and that an item entering an idle shaper leaves exactly
// max(cfg_latency, 1) cycles after it entered.
module tb_traffic_shaper;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] cfg_latency = 0, cfg_gap = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [31:0] in_data = 0, out_data;
  longint cyc = 0;
  longint t_in [int];
  int next_out = 0;
  longint last_out = -1000;

  traffic_shaper #(.WIDTH(32), .DEPTH(16)) dut (.*);

  always @(posedge clk) cyc <= cyc + 1;

  // output monitor, sampled at the falling edge before the transfer
  initial forever begin
    @(negedge clk);
    #2;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != 32'(next_out)) begin
        failures++; $display("FAIL order: got %0d exp %0d", out_data, next_out);
      end else if (cyc + 1 - t_in[next_out] < longint'(cfg_latency)) begin
        failures++; $display("FAIL item %0d early: %0d < %0d", next_out, cyc + 1 - t_in[next_out], cfg_latency);
      end else if (cfg_gap > 1 && cyc + 1 - last_out < longint'(cfg_gap)) begin
        failures++; $display("FAIL item %0d gap %0d < %0d", next_out, cyc + 1 - last_out, cfg_gap);
      end
      last_out = cyc + 1;
      next_out++;
    end
  end

  task automatic push(input int n);
    @(negedge clk);
    in_valid = 1; in_data = 32'(n);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    t_in[n] = cyc + 1;           // transfer at the coming rising edge
    @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic run(input int lat, input int gap, input int count, input bit stall);
    int base;
    @(negedge clk);
    cfg_latency = 16'(lat); cfg_gap = 16'(gap);
    base = next_out;
    fork
      for (int i = 0; i < count; i++) begin
        push(base + i);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      if (stall) while (next_out < base + count) begin
        @(posedge clk); #1 out_ready = ($urandom_range(0, 3) != 0);
      end
    join
    out_ready = 1;
    while (next_out < base + count) @(posedge clk);
  endtask

  task automatic lone(input int lat);
    int n;
    n = next_out;
    @(negedge clk);
    cfg_latency = 16'(lat); cfg_gap = 0;
    repeat (3) @(posedge clk);
    push(n);
    while (next_out == n) @(posedge clk);
    checks++;
    if (last_out - t_in[n] != longint'(lat > 1 ? lat : 1)) begin
      failures++; $display("FAIL lone item latency %0d, expected %0d", last_out - t_in[n], lat);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 0, 50, 1);
    run(10, 0, 50, 1);
    run(30, 4, 40, 0);
    run(5, 3, 40, 1);
    lone(0);
    lone(1);
    lone(25);
    lone(125);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
