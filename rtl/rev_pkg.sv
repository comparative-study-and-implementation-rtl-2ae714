// Shared constants for the reversible 2x2 Vedic multipliers.
//
// Holds the quantum cost of every reversible gate the designs use and a
// small record of the four figures of merit by which reversible circuits
// are compared: number of gates, ancillary (constant) inputs, garbage
// (unused) outputs and quantum cost. Each multiplier computes its own record
// from the gates it instantiates with tally(), so the figures follow the
// structure rather than being typed in by hand.
//
// The gate costs are those published for each gate (Toffoli 5, Peres 4,
// Feynman/CNOT 1, NFT 5, BVPPG 10, BME 6). The record type and the tally
// function are this design's own.
package rev_pkg;

  localparam int unsigned QC_TOFFOLI = 5;
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_FEYNMAN = 1;
  localparam int unsigned QC_NFT     = 5;
  localparam int unsigned QC_BVPPG   = 10;
  localparam int unsigned QC_BME     = 6;

  typedef struct packed {
    int unsigned gates;
    int unsigned ancilla;
    int unsigned garbage;
    int unsigned qcost;
  } metrics_t;

  // Figures of merit of a circuit made of the given numbers of each gate.
  function automatic metrics_t tally(int unsigned n_toffoli, int unsigned n_peres,
                                     int unsigned n_feynman, int unsigned n_nft,
                                     int unsigned n_bvppg, int unsigned n_bme,
                                     int unsigned n_ancilla, int unsigned n_garbage);
    metrics_t m;
    m.gates   = n_toffoli + n_peres + n_feynman + n_nft + n_bvppg + n_bme;
    m.ancilla = n_ancilla;
    m.garbage = n_garbage;
    m.qcost   = n_toffoli * QC_TOFFOLI + n_peres * QC_PERES + n_feynman * QC_FEYNMAN
              + n_nft * QC_NFT + n_bvppg * QC_BVPPG + n_bme * QC_BME;
    return m;
  endfunction

endpackage
