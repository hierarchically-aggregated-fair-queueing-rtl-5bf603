// bandwidth_allocator: HAFQ dynamic bandwidth allocation. Holds, per queue, the
// estimated number of flows and the bandwidth allocated to the queue in
// proportion to it.
//
// The allocated bandwidth is the queue's DRR quantum, in units of QUANTUM_UNIT
// (64) bytes: alloc = N * QPF, limited to 4095, where QPF is the quantum given to
// one flow. Under DRR every backlogged queue then receives a share of the link
// proportional to the number of flows it carries, i.e. the same share per flow.
// The proportional rule is the HAFQ scheme's; the quantum per flow and its unit
// are this design's choices. A write (wr_valid) stores N for wr_queue at the clock
// edge; the two read ports are combinational. After reset every queue holds N = 1.
module bandwidth_allocator
  import hafq_pkg::*;
#(
  parameter int unsigned NQ  = 64,
  parameter int unsigned QPF = 8     // quantum per flow: 8 x 64 B = 512 B
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_valid,
  input  logic [$clog2(NQ)-1:0] wr_queue,
  input  logic [NFLOW_W-1:0]    wr_nflows,
  input  logic [$clog2(NQ)-1:0] rd_queue,
  output logic [BW_W-1:0]       rd_alloc,
  input  logic [$clog2(NQ)-1:0] mon_queue,
  output logic [NFLOW_W-1:0]    mon_nflows,
  output logic [BW_W-1:0]       mon_alloc
);
  localparam logic [BW_W-1:0] BW_MAX = '1;

  logic [NFLOW_W-1:0] nflows [NQ];
  logic [BW_W-1:0]    alloc  [NQ];
  logic [BW_W-1:0]    wr_alloc;

  always_comb begin
    logic [31:0] prod;
    prod     = 32'(wr_nflows) * 32'(QPF);
    wr_alloc = (prod > 32'(BW_MAX)) ? BW_MAX : BW_W'(prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NQ; k++) begin
        nflows[k] <= NFLOW_W'(1);
        alloc[k]  <= BW_W'(QPF);
      end
    end else if (wr_valid) begin
      nflows[wr_queue] <= wr_nflows;
      alloc[wr_queue]  <= wr_alloc;
    end
  end

  assign rd_alloc   = alloc[rd_queue];
  assign mon_nflows = nflows[mon_queue];
  assign mon_alloc  = alloc[mon_queue];

  initial assert (QPF >= 1 && QPF < (1 << BW_W)) else $error("bandwidth_allocator: bad QPF");
endmodule
