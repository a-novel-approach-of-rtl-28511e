// bisr_pkg: types and constants shared by the word-redundancy BISR.
//
// The march test is stored as one instruction per march operation. An
// instruction carries the operation (read or write), its data value (0 or 1,
// expanded to a solid all-zero or all-one word), the address order of the
// march element it belongs to, a flag marking the last operation of the
// element and a stop flag ending the algorithm. This encoding is this
// design's own; the algorithm loaded at reset is March SS:
//   { up(w0); up(r0,r0,w0,r0,w1); up(r1,r1,w1,r1,w0);
//     down(r0,r0,w0,r0,w1); down(r1,r1,w1,r1,w0); up(r0) }   -- 22n operations
// The two "any order" elements (first and last) are run upward.
package bisr_pkg;

  // Operating mode of the BISR (two modes: test & repair, normal).
  typedef enum logic {
    MODE_NORMAL = 1'b0,
    MODE_TEST   = 1'b1
  } mode_e;

  // One march operation.
  typedef struct packed {
    logic stop;  // end of algorithm; other fields ignored
    logic down;  // address order of the element: 1 = decreasing
    logic last;  // last operation of the element
    logic wr;    // 1 = write, 0 = read
    logic val;   // data value: 0 -> all zeros, 1 -> all ones
  } march_instr_t;


  localparam march_instr_t STOP_INSTR = '{stop: 1'b1, default: 1'b0};

  function automatic march_instr_t mk_op(logic down, logic last, logic wr, logic val);
    return '{stop: 1'b0, down: down, last: last, wr: wr, val: val};
  endfunction

  // March SS, instruction idx (0..21), STOP_INSTR beyond.
  function automatic march_instr_t march_ss(int idx);
    // element index and position inside the element
    if (idx == 0)  return mk_op(1'b0, 1'b1, 1'b1, 1'b0);           // M0: w0
    if (idx == 21) return mk_op(1'b0, 1'b1, 1'b0, 1'b0);           // M5: r0
    if (idx >= 1 && idx <= 20) begin
      int e, k;
      logic d, v;
      e = (idx - 1) / 5;          // 0..3 -> M1..M4
      k = (idx - 1) % 5;          // operation inside the element
      d = (e >= 2);               // M3, M4 run downward
      v = e[0];                   // M1, M3 start from 0; M2, M4 from 1
      case (k)
        0, 1:    return mk_op(d, 1'b0, 1'b0, v);   // r v, r v
        2:       return mk_op(d, 1'b0, 1'b1, v);   // w v
        3:       return mk_op(d, 1'b0, 1'b0, v);   // r v
        default: return mk_op(d, 1'b1, 1'b1, ~v);  // w ~v
      endcase
    end
    return STOP_INSTR;
  endfunction

endpackage
