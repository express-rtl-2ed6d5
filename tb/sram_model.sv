// sram_model: behavioural model of the on-chip SRAM seen by the engine's
// memory port (not synthesizable; testbench use only).
//
// WORDS 32-bit words, byte address in, word out. A request is granted in
// the cycle it is made unless a random stall is drawn (STALL_PCT percent of
// cycles); the word returns with rvalid in the next cycle, which gives the
// one-cycle SRAM access of the evaluated micro-controller. With MAX_LAT > 1
// each read instead takes a random 1 to MAX_LAT cycles, still returned in
// the order granted, as a memory behind a cache would; several reads are
// then in flight at once. The testbench fills `mem` directly.
module sram_model #(
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned STALL_PCT = 0,
  parameter int unsigned MAX_LAT   = 1
) (
  input  logic        clk,
  input  logic        req,
  input  logic [31:0] addr,
  output logic        gnt,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];
  logic        stall;
  int unsigned stalls = 0;
  int unsigned reads  = 0;
  int unsigned max_inflight = 0;
  int          edge_n = 0;
  logic [31:0] q_data[$];
  int          q_time[$];

  initial begin
    foreach (mem[i]) mem[i] = '0;
    rvalid = 1'b0;
    rdata  = '0;
    stall  = 1'b0;
  end

  always @(posedge clk) stall <= (STALL_PCT != 0) && ($urandom_range(99) < STALL_PCT);

  assign gnt = req && !stall;

  // Each granted read is queued with the edge at which it returns; return
  // edges strictly increase so the order is kept.
  always @(posedge clk) begin
    automatic int t;
    edge_n = edge_n + 1;
    if (gnt) begin
      t = edge_n + int'($urandom_range(MAX_LAT - 1));
      if (q_time.size() != 0 && t <= q_time[$]) t = q_time[$] + 1;
      q_time.push_back(t);
      q_data.push_back(mem[(addr >> 2) % WORDS]);
      reads <= reads + 1;
    end
    if (q_time.size() > max_inflight) max_inflight = q_time.size();
    rvalid <= 1'b0;
    if (q_time.size() != 0 && q_time[0] <= edge_n) begin
      rvalid <= 1'b1;
      rdata  <= q_data.pop_front();
      void'(q_time.pop_front());
    end
    if (req && !gnt) stalls <= stalls + 1;
  end
endmodule
