// distribute_quantum_data: Bob's (Reformat &) Distribute Quantum Data module.
//
// Pops detection events from the Recov FIFO. An event from exactly one detector becomes a
// (slot, basis, value) triple, with detector index = {basis, value}: the triple goes into the
// Det FIFO, where it waits for Alice's acknowledge list, and the detection pair
// (slot, basis) goes to Classical Send Data. An event in which several detectors fired at
// once carries no usable bit and is dropped (counted in multi_clicks). The last entry of a
// packet produces an end-of-packet marker in both directions; if that entry also carries an
// event, the event goes out first and the marker one clock later. Stalls while the Det FIFO
// is full. Rejecting multi-detector events is this design's choice.
module distribute_quantum_data
  import qkd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Recov FIFO read side
  input  det_event_t  ev,
  input  logic        ev_empty,
  output logic        ev_pop,
  // Det FIFO write side
  output logic        trip_push,
  output triple_t     trip,
  input  logic        trip_full,
  // to Classical Send Data
  output logic        pair_valid,
  output logic        pair_last,
  output pkt_t        pair_pkt,
  output slot_t       pair_slot,
  output logic       pair_basis,
  output logic [31:0] multi_clicks
);
  logic       ev_done;          // event part of current entry already sent
  logic [1:0] idx;
  logic       single;

  always_comb begin
    idx = 2'd0;
    for (int i = 3; i >= 0; i--) if (ev.detmask[i]) idx = 2'(i);
  end
  assign single = (ev.detmask != 4'b0) && ((ev.detmask & (ev.detmask - 4'd1)) == 4'b0);

  wire have     = !ev_empty && !trip_full;
  wire send_ev  = have && single && !ev_done;
  wire send_end = have && ev.last && !send_ev;

  assign ev_pop     = have && !(send_ev && ev.last);
  assign trip_push  = send_ev || send_end;
  assign trip       = '{last: send_end, pkt: ev.pkt, slot: ev.slot,
                        st: '{basis: idx[1], value: idx[0]}};
  assign pair_valid = send_ev || send_end;
  assign pair_last  = send_end;
  assign pair_pkt   = ev.pkt;
  assign pair_slot  = ev.slot;
  assign pair_basis = idx[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_done      <= 1'b0;
      multi_clicks <= '0;
    end else begin
      if (send_ev && ev.last) ev_done <= 1'b1;
      else if (ev_pop)        ev_done <= 1'b0;
      if (have && !ev_done && ev.detmask != 4'b0 && !single && (ev_pop)) multi_clicks <= multi_clicks + 1;
    end
  end
endmodule
