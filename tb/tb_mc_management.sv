// tb_mc_management: pushes a random mix of loads and stores into the
// management module while both engines accept at random. Checks that loads
// reach only the read side and stores only the write side, each in arrival
// order; that requests are buffered (the input keeps accepting up to the
// buffer depth while both engines stall); and that responses offered by the
// two engines are all forwarded exactly once, alternating when both wait.
module tb_mc_management;
  import smappic_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, rd_valid, rd_ready = 0, wr_valid, wr_ready = 0;
  mem_req_t in_req = '0, rd_req, wr_req;
  logic rd_resp_valid = 0, rd_resp_ready, wr_resp_valid = 0, wr_resp_ready, out_valid, out_ready = 1;
  mem_resp_t rd_resp = '0, wr_resp = '0, out_resp;
  logic [2:0] buffered;

  mc_management #(.REQ_DEPTH(4)) dut (.*);

  int rdq[$], wrq[$];
  int n_in = 0, n_rd = 0, n_wr = 0, n_out = 0, alternations = 0, both_wait = 0;
  bit last_was_wr, have_last = 0, rand_ready = 0;
  bit rd_taken, wr_taken;
  int rd_tag = 0, wr_tag = 1000;
  int seen [int];

  initial forever begin
    @(negedge clk);
    #2;
    if (rd_valid && rd_ready) begin
      checks++; n_rd++;
      if (rd_req.wr || rdq.size() == 0 || int'(rd_req.mshr) != rdq[0]) begin failures++; $display("FAIL read steering"); end
      else void'(rdq.pop_front());
    end
    if (wr_valid && wr_ready) begin
      checks++; n_wr++;
      if (!wr_req.wr || wrq.size() == 0 || int'(wr_req.mshr) != wrq[0]) begin failures++; $display("FAIL write steering"); end
      else void'(wrq.pop_front());
    end
    rd_taken = rd_resp_valid && rd_resp_ready;
    wr_taken = wr_resp_valid && wr_resp_ready;
    if (out_valid && out_ready) begin
      int key;
      key = out_resp.wr ? 100000 + int'(out_resp.mshr) : int'(out_resp.mshr);
      checks++; n_out++;
      if (out_resp != (out_resp.wr ? wr_resp : rd_resp) || rd_taken == wr_taken) begin
        failures++; $display("FAIL merge");
      end
      if (rd_resp_valid && wr_resp_valid) begin
        both_wait++;
        if (have_last && out_resp.wr == last_was_wr) begin failures++; $display("FAIL no alternation"); end
        else alternations++;
      end
      last_was_wr = out_resp.wr; have_last = 1;
    end
    @(posedge clk);
    #1;
    if (rd_taken) rd_resp_valid = 0;
    if (wr_taken) wr_resp_valid = 0;
    if (!rd_resp_valid && $urandom_range(0, 1)) begin
      rd_resp = '0; rd_resp.mshr = 8'(rd_tag); rd_tag++; rd_resp_valid = 1;
    end
    if (!wr_resp_valid && $urandom_range(0, 1)) begin
      wr_resp = '0; wr_resp.wr = 1; wr_resp.mshr = 8'(wr_tag); wr_tag++; wr_resp_valid = 1;
    end
    if (rand_ready) begin
      rd_ready = $urandom_range(0, 1);
      wr_ready = $urandom_range(0, 1);
      out_ready = ($urandom_range(0, 3) != 0);
    end
  end

  task automatic push(input bit wr, input int tag);
    @(negedge clk);
    in_valid = 1; in_req = '0; in_req.wr = wr; in_req.mshr = 8'(tag);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    if (wr) wrq.push_back(tag); else rdq.push_back(tag);
    n_in++;
    @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // buffering: both engines stalled, four requests still go in
    for (int i = 0; i < 4; i++) push(i % 2, i);
    repeat (2) @(posedge clk);
    checks++;
    if (buffered != 4 || in_ready) begin failures++; $display("FAIL buffer holds %0d", buffered); end
    rand_ready = 1;
    for (int i = 4; i < 300; i++) push($urandom_range(0, 1), i % 256);
    while (n_rd + n_wr < 300) @(posedge clk);
    checks++;
    if (both_wait == 0) begin failures++; $display("FAIL never saw both engines waiting"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
