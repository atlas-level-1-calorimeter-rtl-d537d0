// hub_pkg: sizes, types and the slow-control register map shared by the FEX-Hub logic.
//
// The slot and stream counts are the board's: 12 node slots, 6 readout streams per FEX,
// 2 readout streams from each Hub FPGA, hence 74 streams into the Hub FPGA and 76 into the
// ROD, and 15 destinations for the TTC clock and combined data stream. The 8-bit geographic
// address width is the board's too. Field widths of the combined control word, the readout
// word width and the register map are this design's own choices; the register map follows
// the Status / Control / Pulse rules of the programming model.
package hub_pkg;

  // ---------------------------------------------------------------- shelf topology
  localparam int unsigned N_NODES     = 12;                            // node slots
  localparam int unsigned FEX_STREAMS = 6;                             // readout streams per FEX
  localparam int unsigned HUB_STREAMS = 2;                             // readout streams per Hub FPGA
  localparam int unsigned N_FEX_RO    = N_NODES * FEX_STREAMS;         // 72
  localparam int unsigned N_RO_IN     = N_FEX_RO + HUB_STREAMS;        // 74: into the Hub FPGA
  localparam int unsigned N_ROD_RO    = N_RO_IN + HUB_STREAMS;         // 76: into the ROD
  localparam int unsigned N_TTC_DEST  = N_NODES + 3;                   // 15 TTC destinations
  localparam int unsigned GA_W        = 8;                             // geographic address
  localparam int unsigned N_RAILS     = 12;                            // supervised DC/DC rails

  // ---------------------------------------------------------------- combined control word
  // One word per bunch crossing on the combined TTC + ROD control stream.
  localparam int unsigned TTC_W  = 8;
  localparam int unsigned BACK_W = 16;

  typedef enum logic [0:0] {
    BACK_ROD1 = 1'b0,   // back data from the ROD on Hub-1
    BACK_ROD2 = 1'b1    // back data from the ROD on Hub-2
  } back_src_e;

  typedef struct packed {
    logic              ttc_valid;
    logic [TTC_W-1:0]  ttc;
    logic              back_valid;
    back_src_e         back_src;
    logic [BACK_W-1:0] back;
  } ctl_word_t;

  // ---------------------------------------------------------------- register bank
  typedef enum logic [1:0] {
    REG_UNDEF   = 2'd0,  // address not in the map: reads zero, writes ignored
    REG_STATUS  = 2'd1,  // read only, set by the hardware
    REG_CONTROL = 2'd2,  // read/write, set only by the controller
    REG_PULSE   = 2'd3   // write makes a one-cycle pulse per set bit, reads zero
  } reg_type_e;

  localparam int unsigned N_REGS = 16;
  localparam int unsigned REG_ADDR_W = 5;

  // Word addresses
  localparam int unsigned R_GEO       = 0;   // S: [7:0] GA, [8] GA valid, [9] this is Hub-1
  localparam int unsigned R_POWER     = 1;   // S: [0] power good, [2:1] ROD power status,
                                             //    [4:3] ROD power control, [7:5] sequencer state
  localparam int unsigned R_RAILFAULT = 2;   // S: [11:0] sticky rail faults
  localparam int unsigned R_CTRL      = 3;   // C: [0] ROD power enable, [1] merge ROD-1, [2] merge ROD-2
  localparam int unsigned R_PULSE     = 4;   // P: [0] clear rail faults, [1] snapshot counters,
                                             //    [2] clear counters (readout and received stream),
                                             //    [3] clear merge overflow flags
  localparam int unsigned R_MON_SEL   = 5;   // C: [6:0] readout channel shown in R_MON_COUNT
  localparam int unsigned R_MON_COUNT = 6;   // S: snapshot word count of the selected channel
  localparam int unsigned R_MERGE     = 7;   // S: [0] ROD-1 overflow, [1] ROD-2 overflow (sticky)
  localparam int unsigned R_POL0      = 8;   // C: polarity inversion, channels 31..0
  localparam int unsigned R_POL1      = 9;   // C: polarity inversion, channels 63..32
  localparam int unsigned R_POL2      = 10;  // C: polarity inversion, channels 73..64
  localparam int unsigned R_SHELF     = 11;  // C: [7:0] shelf address, [8] shelf address valid
  localparam int unsigned R_RX_TTC    = 12;  // S: received combined stream: [7:0] last TTC word,
                                             //    [8] a TTC word has been seen
  localparam int unsigned R_RX_NTTC   = 13;  // S: snapshot count of received TTC words
  localparam int unsigned R_RX_NBACK1 = 14;  // S: snapshot count of received ROD-1 back words
  localparam int unsigned R_RX_NBACK2 = 15;  // S: snapshot count of received ROD-2 back words

  localparam reg_type_e REG_TYPE [N_REGS] = '{
    REG_STATUS, REG_STATUS, REG_STATUS, REG_CONTROL,
    REG_PULSE,  REG_CONTROL, REG_STATUS, REG_STATUS,
    REG_CONTROL, REG_CONTROL, REG_CONTROL, REG_CONTROL,
    REG_STATUS,  REG_STATUS,  REG_STATUS,  REG_STATUS
  };

  // Defined bits of each register; the rest read zero and ignore writes.
  localparam logic [31:0] REG_MASK [N_REGS] = '{
    32'h0000_03FF, 32'h0000_00FF, 32'h0000_0FFF, 32'h0000_0007,
    32'h0000_000F, 32'h0000_007F, 32'hFFFF_FFFF, 32'h0000_0003,
    32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'h0000_03FF, 32'h0000_01FF,
    32'h0000_01FF, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'hFFFF_FFFF
  };

endpackage
