// erfa_pkg: types and constants shared by the ERFA amplifier control blocks.
//
// ERFA is four identical units whose H-bridge inverter outputs are in series.
// Each unit applies +3 kV, 0 V or -3 kV, so the amplifier output is one of
// nine levels, -4..+4 in steps of 3 kV. A "switching vector" holds the state
// of every unit; the number of units, the 3 kV step and the nine levels follow
// the amplifier description. Encodings and widths are this design's choice.
package erfa_pkg;

  localparam int unsigned N_UNITS   = 4;     // units in series
  localparam int unsigned N_LEVELS  = 9;     // output levels -4..+4
  localparam int          MAX_LEVEL = 4;     // +/-12 kV
  localparam int unsigned STEP_V    = 3000;  // volts per unit (nominal DC link)

  // Output level of the whole amplifier, -4..+4 (signed)
  typedef logic signed [3:0] level_t;

  // State of one unit's inverter output
  typedef enum logic [1:0] {
    U_ZERO = 2'b00,   // 0 V
    U_POS  = 2'b01,   // +3 kV
    U_NEG  = 2'b10    // -3 kV
  } unit_state_t;

  // Switching vector: one state per unit, index = unit number
  typedef unit_state_t [N_UNITS-1:0] vector_t;

  // Unit index and a ranking (list of unit indices, best first)
  typedef logic [1:0] unit_idx_t;
  typedef unit_idx_t [N_UNITS-1:0] order_t;

  // Reference source selection
  typedef enum logic [1:0] {
    REF_DIGITAL = 2'b00, // nine-state digital demand
    REF_ANALOG  = 2'b01, // analogue voltage demand (PPCC or external generator)
    REF_CURRENT = 2'b10, // current amplifier, external current reference
    REF_WAVEGEN = 2'b11  // current amplifier, internal waveform generator
  } ref_mode_t;

  // Takeover state
  typedef enum logic [1:0] {
    TO_NONE    = 2'b00,
    TO_ZERO    = 2'b01,  // output forced to 0 V
    TO_REVERSE = 2'b10   // output forced to full opposite polarity
  } takeover_t;

  // Memory address of a level (-4..+4 -> 0..8)
  function automatic logic [3:0] level_addr(level_t l);
    return 4'(signed'(l) + 4);
  endfunction

  // Level produced by a vector
  function automatic level_t vector_level(vector_t v);
    level_t s;
    s = '0;
    for (int i = 0; i < N_UNITS; i++) begin
      if (v[i] == U_POS) s = s + 4'sd1;
      else if (v[i] == U_NEG) s = s - 4'sd1;
    end
    return s;
  endfunction

  function automatic logic [2:0] popcount4(logic [N_UNITS-1:0] m);
    logic [2:0] c;
    c = '0;
    for (int i = 0; i < N_UNITS; i++) c = c + 3'(m[i]);
    return c;
  endfunction

endpackage
