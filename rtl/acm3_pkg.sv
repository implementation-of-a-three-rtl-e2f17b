// Shared types and constants of the three-slot Signal ACM.
//
// Slot numbers 1, 2 and 3 are carried one-hot in a slot_t: bit k-1 is set for
// slot k. The control variables l (last slot written) and r (slot being read
// or last read) and the writer's w are all of this type.
//
// differ() is the reference form of the writer's slot choice (the "differ"
// function of the algorithm): the new slot is neither l nor r. The hardware
// does not call it; it builds the same choice from three SYNC arbiters, and
// testbenches use this function as the independent reference.
package acm3_pkg;

  localparam int unsigned NSLOT = 3;

  typedef logic [NSLOT-1:0] slot_t;

  localparam slot_t SLOT1 = 3'b001;
  localparam slot_t SLOT2 = 3'b010;
  localparam slot_t SLOT3 = 3'b100;

  // Branch k of the writer (0-based index, slot k+1) asks its SYNC arbiter
  // whether r differs from slot sync_slot(k) (slot 1 -> 3, 2 -> 1, 3 -> 2).
  // If it does, the next w is that slot; otherwise it is alt_slot(k).
  function automatic int unsigned sync_slot(int unsigned k);
    return (k + 2) % NSLOT;
  endfunction

  function automatic int unsigned alt_slot(int unsigned k);
    return (k + 1) % NSLOT;
  endfunction

  // Reference differ(l, r): the table of the algorithm, slots one-hot.
  function automatic slot_t differ(slot_t l, slot_t r);
    slot_t w;
    unique case (l)
      SLOT1:   w = (r != SLOT3) ? SLOT3 : SLOT2;
      SLOT2:   w = (r != SLOT1) ? SLOT1 : SLOT3;
      default: w = (r != SLOT2) ? SLOT2 : SLOT1;
    endcase
    return w;
  endfunction

  function automatic int unsigned slot_num(slot_t s);
    return s[0] ? 1 : s[1] ? 2 : s[2] ? 3 : 0;
  endfunction

endpackage
