// hector_pkg: constants and types shared by the HECTOR ASIC command interface
// and the blocks behind it.
//
// The ASIC is driven by 88-bit commands whose first four bits (the MSBs, as
// commands are shifted in MSB first) name the target block; the remaining 84
// bits are block-specific configuration. Widths of the command and of the
// output bus follow the design description; the block numbering and the
// field layout below are this implementation's own choice.
package hector_pkg;

  localparam int unsigned CMD_W  = 88;  // command word width
  localparam int unsigned DATA_W = 32;  // shared output bus width

  // Block identifiers carried in cmd[87:84].
  typedef enum logic [3:0] {
    BLK_NONE      = 4'd0,
    BLK_PLL_TRNG  = 4'd1,
    BLK_ELO_TRNG  = 4'd2,
    BLK_TERO_PUF  = 4'd3,
    BLK_RO_PUF    = 4'd4,
    BLK_TERO_TEST = 4'd5
  } block_id_e;

  // Field layout of a command (MSB first).
  //   [87:84] block id
  // PLL TRNG:  [83:76] KM1  [75:68] KD1  [67:60] KM2  [59:52] KD2  [51:40] KD
  // ELO TRNG:  [83:80] RO select  [79:48] K preload
  // PUFs:      [83:77] Sel1  [76:70] Sel2  [69:67] arbiter config
  //            [66:51] TERO activation time in clk_asic cycles
  // TERO test: [83:77] cell select
  typedef struct packed {
    logic [7:0]  km1;
    logic [7:0]  kd1;
    logic [7:0]  km2;
    logic [7:0]  kd2;
    logic [11:0] kd;
    logic [39:0] unused;
  } pll_cfg_t;

  typedef struct packed {
    logic [3:0]  ro_sel;
    logic [31:0] k;
    logic [47:0] unused;
  } elo_cfg_t;

  typedef struct packed {
    logic [6:0]  sel1;
    logic [6:0]  sel2;
    logic [2:0]  arb_cfg;
    logic [15:0] t_act;
    logic [50:0] unused;
  } puf_cfg_t;

  typedef struct packed {
    logic [6:0]  sel;
    logic [76:0] unused;
  } test_cfg_t;

endpackage
