// Shared constants and types of the three-dimensional round-robin (3DRR)
// switch. The switch has N ports split into M = N/K groups of K ports; each
// group shares one common input buffer. The defaults (N = 16, K = 4, so M = 4)
// are the 16x16 example built from four 4x4 common input buffers. Indices of
// ports, outputs and round-robin addresses are carried in IDX_W bits, which
// covers switches of up to 256 ports; the cell payload width is this design's
// own choice.
package tdrr_pkg;
  localparam int unsigned N_DEF     = 16;  // switch size N
  localparam int unsigned K_DEF     = 4;   // ports per common input buffer K
  localparam int unsigned IDX_W     = 8;   // width of every port/output index
  localparam int unsigned PAYLOAD_W = 32;  // cell payload bits

  typedef logic [IDX_W-1:0] idx_t;

  // A fixed-size cell as it travels through the switch.
  typedef struct packed {
    logic                 valid;
    idx_t                 dest;     // destination output port
    logic [PAYLOAD_W-1:0] payload;
  } cell_t;

  // Round-robin position: (base + step) modulo n, for small operands.
  function automatic idx_t rr_mod(input int unsigned base, input int unsigned step,
                                  input int unsigned n);
    return idx_t'((base + step) % n);
  endfunction
endpackage
