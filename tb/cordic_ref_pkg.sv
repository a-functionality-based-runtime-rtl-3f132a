// cordic_ref_pkg: reference functions of the case-study circuits, used by the
// behavioural circuit model and by the testbenches to work out expected
// results.
//
// Task 0: square root, out = floor(sqrt(in * 256))      (in unsigned)
// Task 1: sine,        out = round(127 * sin(2*pi*in/256)) (two's complement)
// Task 2: tanh,        out = round(127 * tanh(in / 32))    (in signed Q3.5)
// Task 3: unused slot, out = ~in
// Latencies (cycles from start to done) are those of the CORDIC cores of
// the case study: 15, 19 and 56 cycles; the unused slot takes 15.
package cordic_ref_pkg;

  function automatic int unsigned latency(input int unsigned task_id);
    case (task_id)
      0:       return 15;
      1:       return 19;
      2:       return 56;
      default: return 15;
    endcase
  endfunction

  function automatic logic [7:0] compute(input int unsigned task_id, input logic [7:0] din);
    real    x;
    int     r;
    int unsigned v, s;
    case (task_id)
      0: begin
        v = 32'(din) << 8;
        s = 0;
        while ((s + 1) * (s + 1) <= v) s++;
        return 8'(s);
      end
      1: begin
        x = 2.0 * 3.14159265358979 * real'(din) / 256.0;
        r = int'($floor(127.0 * $sin(x) + 0.5));
        return 8'(r);
      end
      2: begin
        x = real'($signed(din)) / 32.0;
        r = int'($floor(127.0 * $tanh(x) + 0.5));
        return 8'(r);
      end
      default: return ~din;
    endcase
  endfunction

endpackage
