// tb_butterfly: self-checking test of the three-type butterfly.
// Streams random operand pairs, one per clock, with random types and
// twiddles (type 1 uses a random Q2.14 twiddle, types 2 and 3 imply W = 1
// and W = -j), and compares every output with A+B and a reference
// (A-B)*W computed here with the same round-half-up rescaling. Checks the
// three-clock latency and full throughput, and that bubbles (in_valid low)
// produce no output.
module tb_butterfly;
  import fft_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     in_valid;
  cplx_t    a, b, y0, y1;
  twiddle_t w;
  bf_type_t bf_type;
  logic     out_valid;

  int checks = 0, failures = 0, cycle = 0;
  int n_type [4];

  typedef struct {cplx_t y0; cplx_t y1; int t_in;} exp_t;
  exp_t q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  butterfly dut (.*);

  function automatic logic signed [15:0] rnd_shift(input longint p);
    return 16'((p + 8192) >>> 14);
  endfunction

  // reference
  function automatic exp_t model(input cplx_t a_i, b_i, input twiddle_t w_i, input bf_type_t t);
    exp_t   e;
    longint dr, di;
    e.y0.re = a_i.re + b_i.re;
    e.y0.im = a_i.im + b_i.im;
    dr = longint'(a_i.re) - b_i.re;
    di = longint'(a_i.im) - b_i.im;
    case (t)
      BF_TYPE1: begin
        e.y1.re = rnd_shift(dr * w_i.re - di * w_i.im);
        e.y1.im = rnd_shift(dr * w_i.im + di * w_i.re);
      end
      BF_TYPE3: begin e.y1.re = 16'(di); e.y1.im = 16'(-dr); end
      default:  begin e.y1.re = 16'(dr); e.y1.im = 16'(di); end
    endcase
    return e;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: output without input");
      end else begin
        e = q.pop_front();
        if (cycle - e.t_in != 3) begin
          failures++; $display("FAIL: latency %0d", cycle - e.t_in);
        end
        if (y0 !== e.y0 || y1 !== e.y1) begin
          failures++;
          if (failures < 10)
            $display("FAIL: y0=(%0d,%0d) y1=(%0d,%0d) expected (%0d,%0d) (%0d,%0d)",
                     y0.re, y0.im, y1.re, y1.im, e.y0.re, e.y0.im, e.y1.re, e.y1.im);
        end
      end
    end
  end

  initial begin
    exp_t e;
    in_valid = 0; a = '0; b = '0; w = '0; bf_type = BF_TYPE2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i % 7) != 3;          // a bubble now and then
      a.re = 16'($signed(15'($urandom))) >>> 1;
      a.im = 16'($signed(15'($urandom))) >>> 1;
      b.re = 16'($signed(15'($urandom))) >>> 1;
      b.im = 16'($signed(15'($urandom))) >>> 1;
      case ($urandom % 3)
        0: begin bf_type = BF_TYPE1;
             w.re = 16'($signed(16'($urandom % 32769)) - 16384);
             w.im = 16'($signed(16'($urandom % 32769)) - 16384); end
        1: begin bf_type = BF_TYPE2; w.re = 16'sd16384; w.im = 0; end
        default: begin bf_type = BF_TYPE3; w.re = 0; w.im = -16'sd16384; end
      endcase
      if (in_valid) begin
        e = model(a, b, w, bf_type);
        e.t_in = cycle;
        q.push_back(e);
        n_type[int'(bf_type)]++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    for (int t = 1; t <= 3; t++) begin
      checks++;
      if (n_type[t] == 0) begin failures++; $display("FAIL: type %0d never used", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
