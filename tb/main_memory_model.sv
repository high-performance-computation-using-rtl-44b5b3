// main_memory_model: behavioural model of the main memory as the DMA engine
// sees it (not synthesizable; main memory itself is bought-in DRAM). A
// request is accepted in a clock where gnt is high; gnt is withheld at random
// clocks (STALL_PCT percent) to exercise back-pressure. Reads answer in
// order with rvalid/rdata LATENCY clocks after acceptance; writes update the
// array at once. The array holds WORDS 64-bit words.
module main_memory_model #(
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned LATENCY   = 20,
  parameter int unsigned MAW       = 32,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic           clk,
  input  logic           req,
  input  logic           we,
  input  logic [MAW-1:0] addr,
  input  logic [63:0]    wdata,
  output logic           gnt,
  output logic           rvalid,
  output logic [63:0]    rdata
);
  logic [63:0] mem [WORDS];
  logic [63:0] q_data [$];
  longint      q_due  [$];
  longint      now = 0;
  int          stalls = 0, reads = 0, writes = 0;

  initial begin
    gnt    = 1;
    rvalid = 0;
    rdata  = '0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    if (req && gnt && !we) begin
      q_data.push_back(mem[addr % WORDS]);
      q_due.push_back(now + longint'(LATENCY) - 1);
      reads++;
    end
    if (req && gnt && we) begin
      mem[addr % WORDS] <= wdata;
      writes++;
    end
    if (req && !gnt) stalls++;
    gnt <= ($urandom % 100) >= STALL_PCT;
    if (q_due.size() > 0 && q_due[0] <= now) begin
      rvalid <= 1'b1;
      rdata  <= q_data.pop_front();
      void'(q_due.pop_front());
    end else begin
      rvalid <= 1'b0;
    end
  end
endmodule
