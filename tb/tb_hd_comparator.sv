// tb_hd_comparator: self-checking test of the Hamming distance comparator.
// A 4-bit, h = 1 instance (the example machine's size) is checked over every
// value/key pair, and a 20-bit instance with h = 3 (the input width used when
// discussing key recovery) over random pairs plus pairs built at distance
// exactly h-1, h and h+1. The expected result comes from $countones.
module tb_hd_comparator;
  logic [3:0]  v4, k4;
  logic        hit4;
  logic [19:0] v20, k20;
  logic        hit20;
  int checks = 0, failures = 0;
  int onset4;

  hd_comparator #(.N(4),  .H(1)) dut4  (.value(v4),  .key(k4),  .hit(hit4));
  hd_comparator #(.N(20), .H(3)) dut20 (.value(v20), .key(k20), .hit(hit20));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [19:0] flip_bits(input logic [19:0] base, input int n);
    logic [19:0] r;
    int pos;
    r = base;
    for (int i = 0; i < n; i++) begin
      do pos = $urandom_range(19); while (r[pos] != base[pos]);
      r[pos] = ~r[pos];
    end
    return r;
  endfunction

  initial begin

    onset4 = 0;
    for (int k = 0; k < 16; k++) begin
      for (int v = 0; v < 16; v++) begin
        v4 = 4'(v); k4 = 4'(k);
        #1;
        checks++;
        if (hit4 !== ($countones(v4 ^ k4) == 1)) begin
          failures++;
          $display("FAIL N=4 value=%b key=%b hit=%b", v4, k4, hit4);
        end
      end
    end
    // on-set of key 1100, h = 1 holds C(4,1) = 4 codes
    k4 = 4'b1100;
    for (int v = 0; v < 16; v++) begin
      v4 = 4'(v);
      #1;
      if (hit4) onset4 = onset4 + 1;
    end
    checks++;
    if (onset4 != 4) begin failures++; $display("FAIL on-set size %0d", onset4); end

    for (int i = 0; i < 3000; i++) begin
      k20 = 20'($urandom);
      case (i % 4)
        0: v20 = 20'($urandom);
        1: v20 = flip_bits(k20, 2);
        2: v20 = flip_bits(k20, 3);
        default: v20 = flip_bits(k20, 4);
      endcase
      #1;
      checks++;
      if (hit20 !== ($countones(v20 ^ k20) == 3)) begin
        failures++;
        $display("FAIL N=20 value=%h key=%h hit=%b", v20, k20, hit20);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
