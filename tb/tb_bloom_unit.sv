// Unit test of bloom_unit: insertion masks, membership after inserting three
// items into an empty 16-bit filter with two hash functions (no false
// negatives), cardinality estimate, and random filters against a reference.
//
// How: purely combinational; stimulus is applied with #1 steps and compared
// with a software model. Interface: none (top level). Timing: a watchdog ends
// the run as failed at time 100000. Source: m = 16, k = 2 and inserting three
// items follow the method's Bloom filter example; the item values, the hash
// bit positions and the random test vectors are this design's.
module tb_bloom_unit;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;

  vid_t   v;
  bloom_t filt, mask;
  logic   member;
  logic [$clog2(BLOOM_M+1)-1:0] card;
  int checks = 0, failures = 0;

  bloom_unit dut (.v, .filt, .mask, .member, .card);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bloom_t f, m;
    vid_t items [3];
    // three insertions into an empty filter
    f = '0;
    items[0] = 32'd7; items[1] = 32'd1234; items[2] = 32'd99999;
    for (int i = 0; i < 3; i++) begin
      v = items[i]; filt = '0; #1;
      check(mask == bmask(int'(items[i])), $sformatf("mask of %0d", items[i]));
      check($countones(mask) inside {1, 2}, "mask has one or two bits");
      f |= mask;
    end
    for (int i = 0; i < 3; i++) begin
      v = items[i]; filt = f; #1;
      check(member, $sformatf("inserted %0d not a member", items[i]));
    end
    // random vertices and filters
    for (int t = 0; t < 2000; t++) begin
      v    = $urandom;
      filt = 16'($urandom);
      #1;
      m = bmask(int'(v));
      check(mask == m, "random mask");
      check(member == ((m & filt) == m), "random membership");
      check(int'(card) == $countones(filt) / 2, "cardinality estimate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
