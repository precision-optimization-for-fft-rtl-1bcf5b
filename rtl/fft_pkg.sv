// fft_pkg: types and helper functions shared by the memory-based radix-2 FFT.
//
// The processor keeps every intermediate result in the same fixed wordlength
// and changes only the implied binary point from stage to stage. The scaling
// schedule is a bit vector with one bit per stage, most significant bit for
// the first stage: a 1 means the stage gains one integer bit (its result is
// shifted right by one with truncation), a 0 means the stage keeps the input
// format and clamps overflowing results by saturation. This is the same bit
// ordering the configuration IDs use for the 256-point sweep (ID 245 =
// 1111_0101). The helpers below are pure functions used at elaboration time
// and in the address generator.
package fft_pkg;

  // Operating phase of the control unit.
  typedef enum logic [1:0] {
    PH_LOAD  = 2'd0,  // accepting N samples into storage (bit-reversed order)
    PH_RUN   = 2'd1,  // issuing butterflies, one per cycle
    PH_DRAIN = 2'd2   // waiting for the PE pipeline to empty between stages
  } phase_e;

  // Reverse the lowest `bits` bits of `v`.
  function automatic int unsigned bitrev(input int unsigned v, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) begin
      r = (r << 1) | ((v >> i) & 1);
    end
    return r;
  endfunction

  // Number of ones in a schedule vector: the integer bits the data gains
  // from input to output.
  function automatic int unsigned sched_gain(input logic [31:0] sched, input int unsigned stages);
    int unsigned g;
    g = 0;
    for (int unsigned i = 0; i < stages; i++) begin
      g += int'(sched[i]);
    end
    return g;
  endfunction

endpackage
