// rs_pkg: types and constants shared by the Readout Supervisor modules.
//
// The word formats below (external L0/L1 trigger words, the AFIFO and TFIFO
// entries, the IOBUS bundle and the configuration record) are this design's
// own choices: the original hardware fixes only the FIFO width (9 bits), the
// IOBUS signal set (CS10-1, RADR[4..0], BDAT[31..0], WR, /SRES) and the
// counter layout (two modules of sixteen 32-bit counters).
package rs_pkg;

  // LHC bunch crossings per turn (machine constant, not a design choice).
  localparam int unsigned BX_PER_ORBIT = 3564;
  localparam int unsigned BX_W         = 12;

  // External L0 trigger word, 16 bits, delivered once per bunch crossing.
  typedef struct packed {
    logic [11:0] bcid;    // bunch ID the decision belongs to
    logic [1:0]  spare;
    logic        frc;   // trigger must also be accepted at L1
    logic        accept;  // L0 YES
  } l0_word_t;

  // External L1 trigger word, 8 bits, delivered once per decision.
  typedef struct packed {
    logic [6:0] evid;     // event number LSBs
    logic       accept;
  } l1_word_t;

  // L0 Accept FIFO entry (9 bits, one per accepted L0 trigger).
  typedef struct packed {
    logic       frc;    // accept at L1 whatever the L1 decision
    logic       ext;      // trigger came from the external L0 path
    logic [6:0] evid;
  } afifo_word_t;

  // L1 trigger de-randomizer entry (9 bits, one per L1 decision).
  typedef struct packed {
    logic       accept;
    logic       frc;
    logic [6:0] evid;
  } tfifo_word_t;

  // Internal IOBUS driven by the I/O interface.
  localparam int unsigned NCS = 10;
  typedef struct packed {
    logic [NCS:1] cs;     // one-hot chip select
    logic [4:0]   radr;   // register address
    logic [31:0]  wdata;  // BDAT during writes
    logic         wr;     // one-cycle write strobe
    logic         rd;     // read cycle in progress
  } iobus_t;

  // Run configuration held in the general CSR.
  typedef struct packed {
    logic        l0_ext_en;      // use external L0 triggers
    logic        l1_ext_en;      // use external L1 decisions
    logic        use_ext_orbit;  // bunch counter follows the external orbit
    logic        bcr_en;         // broadcast BCR every turn
    logic        rnd_en;
    logic        ecs_l0_inh;
    logic        ecs_l1_inh;
    logic        thr_l0_en;      // obey external L0 throttle
    logic        thr_l1_en;      // obey external L1 throttle
    logic        l0_phase_neg;   // H_0PHASE
    logic        l1_phase_neg;   // H_1PHASE
    logic [3:0]  pipe_depth;
    logic [1:0]  rnd_l1_mode;
    logic [7:0]  gap_len;
    logic [11:0] bcr_bx;
    logic [3:0]  orbit_dly;      // orbit delay line setting, 1.5 ns per step
    logic [15:0] rnd_l0_rate;
    logic [15:0] rnd_l1_rate;
    logic [15:0] per_period;
    logic [7:0]  l1_spacing;
    logic [11:0] cal_bx;
    logic [7:0]  cal_turns;
    logic [7:0]  cal_delay;
    logic [7:0]  cal_cmd;
    logic [4:0]  derand_thr;
    logic [7:0]  readout_cycles;
    logic [7:0]  l1buf_thr;
    logic [15:0] l1_drain;
    logic [10:0] ps_factor0;
    logic [10:0] ps_factor1;
    logic [31:0] ps_mask;
  } cfg_t;

  // Hamming check bits of a TTC short broadcast (8 data bits, 5 check bits).
  function automatic logic [4:0] ttc_hamming(input logic [7:0] d);
    logic [4:0] h;
    h[0] = d[0] ^ d[1] ^ d[2] ^ d[3];
    h[1] = d[0] ^ d[4] ^ d[5] ^ d[6];
    h[2] = d[1] ^ d[2] ^ d[4] ^ d[5] ^ d[7];
    h[3] = d[1] ^ d[3] ^ d[4] ^ d[6] ^ d[7];
    h[4] = ^{d, h[3:0]};
    return h;
  endfunction

endpackage
