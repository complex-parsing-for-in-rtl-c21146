// forwarding_table: exact-match table from IPv4 destination address to
// egress port.
//
// Applied on the final pass of a frame. The control plane writes up to
// ENTRIES entries {valid, 32-bit destination address, 9-bit port}
// (fwd_entry_t). A lookup compares the key with every valid entry in
// parallel; the lowest-numbered matching entry gives the port. A frame
// without an IPv4 header, or whose address matches no entry, misses and is
// dropped by the traffic manager.
//
// Timing: one register stage; out_hit/out_port follow in_valid by one cycle.
// The table and its key follow the design description; its size, the miss
// action (drop) and the priority among duplicate entries are this design's.
module forwarding_table
  import dune_pkg::*;
#(
  parameter int ENTRIES = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cp_we,
  input  logic [$clog2(ENTRIES)-1:0] cp_addr,
  input  logic [63:0]                cp_wdata,
  input  logic                       in_valid,
  input  logic                       key_v,
  input  logic [31:0]                dst_ip,
  output logic                       out_valid,
  output logic                       out_hit,
  output port_t                      out_port
);
  fwd_entry_t tbl [ENTRIES];
  logic  hit;
  port_t port;

  always_comb begin
    hit  = 1'b0;
    port = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (key_v && tbl[e].valid && tbl[e].dst_ip == dst_ip) begin
        hit  = 1'b1;
        port = tbl[e].port;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '0;
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
      out_port  <= '0;
    end else begin
      if (cp_we) tbl[cp_addr] <= fwd_entry_t'(cp_wdata);
      out_valid <= in_valid;
      if (in_valid) begin
        out_hit  <= hit;
        out_port <= port;
      end
    end
  end
endmodule
