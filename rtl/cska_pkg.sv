// cska_pkg: types and helpers shared by the carry skip adders.
//
// A stage-size list is a fixed-length array of MAX_STAGES entries; the
// first Q entries hold the sizes of stages 1..Q (least significant stage
// first) and the rest are zero. stage_offset() gives the bit position of
// the least significant bit of a stage, stage_total() the adder width a
// list describes. Using a fixed-length list lets every adder take its
// stage sizes as one typed parameter.
package cska_pkg;

  localparam int unsigned MAX_STAGES = 16;

  typedef int unsigned size_list_t [MAX_STAGES];

  // Bit position of the LSB of stage idx (0-based index into the list).
  function automatic int unsigned stage_offset(size_list_t sizes, int unsigned idx);
    int unsigned off = 0;
    for (int unsigned k = 0; k < MAX_STAGES; k++)
      if (k < idx) off += sizes[k];
    return off;
  endfunction

  // Sum of the first q stage sizes.
  function automatic int unsigned stage_total(size_list_t sizes, int unsigned q);
    return stage_offset(sizes, q);
  endfunction

  // Default 32-bit variable-stage-size CI-CSKA: sizes grow by one bit per
  // stage up to the nucleus (stage 5), then shrink to a single-bit last stage.
  localparam size_list_t CI_SIZES_32 = '{2, 3, 4, 5, 6, 5, 4, 2, 1, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned CI_Q_32 = 9;

  // Default 32-bit hybrid variable-latency CSKA: nucleus stage 4 is an
  // 8-bit parallel-prefix stage.
  localparam size_list_t HY_SIZES_32 = '{3, 4, 5, 8, 5, 4, 2, 1, 0, 0, 0, 0, 0, 0, 0, 0};
  localparam int unsigned HY_Q_32 = 8;
  localparam int unsigned HY_P_32 = 4;

endpackage
