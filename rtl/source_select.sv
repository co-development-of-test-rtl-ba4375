// source_select: data synthesis and substitution for the outgoing slots.
//
// At each slot start the formatter raises `slot_req` for one cycle and
// takes `pkt`/`route` if `pkt_valid` is high in that cycle. This block
// decides what it gets:
//   mode SRC_PCIE            the head of the PCIe packet buffer, if any;
//   mode SRC_PRBS / PATTERN  with inline_fill = 0, a synthesized packet in
//                            every slot, in place of system data: a PCIe
//                            packet waiting at that slot is popped and
//                            discarded;
//                            with inline_fill = 1, PCIe packets go first
//                            and a synthesized packet fills every slot
//                            that has no PCIe packet.
// Synthesized packets carry `synth_route`; PCIe packets carry the route
// translated from their own contents. `prbs_next` advances the random
// source after a random packet is taken, so each slot gets a new one.
// Purely combinational. The modes follow the document's "data synthesis
// and substitution in-line with or in place of system data"; their exact
// rules are this design's.
`timescale 1ps / 1ps
module source_select
  import ops_pkg::*;
(
  input  src_mode_e             mode,
  input  logic                  inline_fill,
  input  logic                  slot_req,
  input  logic                  pcie_empty,
  input  logic [PKT_W-1:0]      pcie_pkt,
  input  logic [ROUTE_BITS-1:0] pcie_route,
  output logic                  pcie_pop,
  input  logic [PKT_W-1:0]      prbs_pkt,
  output logic                  prbs_next,
  input  logic [PKT_W-1:0]      pat_pkt,
  input  logic [ROUTE_BITS-1:0] synth_route,
  output logic [PKT_W-1:0]      pkt,
  output logic [ROUTE_BITS-1:0] route,
  output logic                  pkt_valid,
  output logic                  synth
);

  logic use_pcie;

  always_comb begin
    use_pcie = (mode == SRC_PCIE) || (inline_fill && !pcie_empty);
    synth    = !use_pcie;
    if (use_pcie) begin
      pkt       = pcie_pkt;
      route     = pcie_route;
      pkt_valid = !pcie_empty;
    end else begin
      pkt       = (mode == SRC_PRBS) ? prbs_pkt : pat_pkt;
      route     = synth_route;
      pkt_valid = 1'b1;
    end
    pcie_pop  = slot_req && !pcie_empty;
    prbs_next = slot_req && synth && (mode == SRC_PRBS);
  end

endmodule
