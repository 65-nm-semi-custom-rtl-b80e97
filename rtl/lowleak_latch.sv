// lowleak_latch: one storage cell of the latch array, the single custom
// standard cell of the memory.
//
// A static D-latch whose output reaches the read bitline through a 3-state
// buffer built into the cell. While `gclk` is high the latch is transparent
// and `q` follows `d`; when `gclk` falls the value is held. The read output
// `rbl_drv` carries `q` while `rd_en` is high and is released otherwise.
//
// A 3-state bus is modelled here with two-valued logic: a released output
// drives 0, and the bitline of a column is the OR of all cell outputs of
// that column (see scm_latch_array). Since the read decoder enables exactly
// one row, this gives the same value as the single active 3-state driver.
// The transistor-level measures of the real cell (stacking, longer
// channels) have no logic function and are not modelled.
//
// The latch is intentional: it is the storage element of the memory.
module lowleak_latch (
  input  logic gclk,     // row write clock from the clock gate, high = transparent
  input  logic d,        // write data (column write bitline)
  input  logic rd_en,    // 3-state output enable from the read decoder
  output logic rbl_drv   // contribution to the read bitline
);
  logic q;  // stored value

  always_latch begin
    if (gclk) q = d;
  end

  assign rbl_drv = rd_en & q;
endmodule
