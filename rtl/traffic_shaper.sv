// traffic_shaper: performance model of an off-node link (inter-node bridge,
// memory controller). Items entering it are buffered together with their
// arrival time and leave no earlier than cfg_latency cycles after arrival,
// and no two leave closer than cfg_gap cycles apart. cfg_latency therefore
// sets the added latency and cfg_gap the bandwidth (one item per cfg_gap
// cycles; 0 or 1 means no limit). Both are run-time inputs so a prototype
// can be retuned without rebuilding. Order is preserved.
//
// The SMAPPIC paper asks only for configurable bandwidth and latency; the
// timestamp FIFO, the gap-based bandwidth control and the depth are this
// design's choices. Throughput at full bandwidth needs DEPTH >= cfg_latency;
// a shallower buffer back-pressures the input instead of dropping.
//
// Interface: ready/valid in and out. With cfg_latency = 0 and cfg_gap <= 1 an
// item can leave one cycle after it enters (the FIFO has no fall-through).
module traffic_shaper #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CFG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CFG_W-1:0] cfg_latency,
  input  logic [CFG_W-1:0] cfg_gap,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned TS_W = CFG_W + 1;

  logic [TS_W-1:0]  now;
  logic [TS_W-1:0]  head_ts, age;
  logic             head_valid, head_ready;
  logic [CFG_W-1:0] gap_cnt;      // cycles until the next item may leave
  logic             ripe;

  sync_fifo #(.WIDTH(WIDTH + TS_W), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data({now, in_data}),
    .rd_valid(head_valid), .rd_ready(head_ready), .rd_data({head_ts, out_data}),
    .count()
  );

  // Modular age: correct while an item waits less than 2^CFG_W cycles.
  assign age        = now - head_ts;
  assign ripe       = age >= TS_W'(cfg_latency);
  assign out_valid  = head_valid && ripe && (gap_cnt == '0);
  assign head_ready = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now     <= '0;
      gap_cnt <= '0;
    end else begin
      now <= now + 1'b1;
      if (out_valid && out_ready) gap_cnt <= (cfg_gap > 1) ? cfg_gap - 1'b1 : '0;
      else if (gap_cnt != '0)     gap_cnt <= gap_cnt - 1'b1;
    end
  end
endmodule
