// ca_pkg: shared constants and types of the chemical-algorithm engine.
//
// The resource reservation below is the main configuration of the design:
// up to 8 reactions, each with up to 8 reactant (and 8 product) slots, each
// slot of stoichiometric order up to 8, over 255 species with 16-bit
// concentrations and single-precision reaction coefficients. Species
// address 0 is reserved: it means "no species" in a stoichiometric record
// and reads as concentration 1, the identity of the propensity product.
//
// The configuration-request struct and the operation codes are this
// design's own choice; they carry one level-2 programming write from the
// manager to a chemical engine.
package ca_pkg;

  // Resource reservation
  localparam int unsigned NR     = 8;    // max number of reactions |R|
  localparam int unsigned NPSI   = 8;    // max reactants/products per reaction |Psi|
  localparam int unsigned NS     = 255;  // max number of species |S|
  localparam int unsigned CW     = 16;   // concentration width |C|
  localparam int unsigned NALPHA = 8;    // max stoichiometric coefficient |alpha| = |beta|
  localparam int unsigned KW     = 32;   // reaction coefficient width (IEEE-754 single)
  localparam int unsigned SAW    = $clog2(NS + 1);  // species address width

  // Engine-side I/O mapping
  localparam int unsigned N_IN   = 4;    // external input event lines per engine
  localparam int unsigned N_OUT  = 8;    // external output event lines per engine

  // Level-2 configuration operations
  typedef enum logic [3:0] {
    CFG_NOP      = 4'h0,
    CFG_WR_C     = 4'h1,  // idx0 = species, data[CW-1:0] = concentration
    CFG_WR_K     = 4'h2,  // idx0 = reaction, data = IEEE-754 coefficient
    CFG_WR_ALPHA = 4'h3,  // idx0 = reaction, idx1 = {slot, order}, data[7:0] = species
    CFG_WR_BETA  = 4'h4,  // same layout as CFG_WR_ALPHA, for products
    CFG_RD_C     = 4'h5,  // idx0 = species (monitor read)
    CFG_MAP_IN   = 4'h6,  // idx0 = port, idx1 = species, data[15:0] = molecules/event
    CFG_MAP_OUT  = 4'h7,  // idx0 = port, idx1 = species, data[15:0] = molecules/event
    CFG_TICKRATE = 4'h8,  // data = IEEE-754 clock ticks per second
    CFG_RUN      = 4'h9   // data[0] = scheduler enable
  } cfg_op_e;

  typedef struct packed {
    logic        valid;
    cfg_op_e     op;
    logic [7:0]  idx0;
    logic [7:0]  idx1;
    logic [31:0] data;
  } cfg_req_t;

  // Float constants
  localparam logic [31:0] FP_ONE  = 32'h3F80_0000;  // 1.0
  localparam logic [31:0] FP_80M  = 32'h4C98_9680;  // 80e6 ticks per second

endpackage
