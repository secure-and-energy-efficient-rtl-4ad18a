// sha256_core: SHA-256 compression engine operated one step per instruction.
//
// The processor drives it through six custom instructions, one operation per
// clock cycle:
//   SHA_RST      load the initial hash value H0..H7 (new message stream)
//   SHA_PUSH     shift one 32-bit message word into the 16-word window;
//                after 16 pushes the window holds W[0..15], W[0] pushed first
//   SHA_START    copy H0..H7 into the working variables a..h, clear the round count
//   SHA_PERFORM  one compression round t: uses W[t] from the head of the window and
//                shifts in W[t+16] = s1(W[t+14]) + W[t+9] + s0(W[t+1]) + W[t],
//                so the message schedule is produced on the fly
//   SHA_FINISH   H[i] += working variable i (end of the 64-byte block)
//   SHA_READ     rdata = H[rd_idx] (combinational, written back by the processor)
// A message block therefore costs 16 push + 1 start + 64 perform + 1 finish
// cycles, plus the loads that fetch the words. Padding and byte order are the
// software's job: words are taken as big-endian message words.
// The instruction set and the 64-round flow are the design's; the register
// structure (a 16-word shifting window instead of a 64-word schedule memory) is
// this implementation's choice, the simplest that does the job. The hardware
// reset acts like SHA_RST. An assertion checks that the round counter never
// passes ROUNDS (it saturates there).
module sha256_core
  import rv_pkg::*;
#(
  parameter int ROUNDS = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  sha_op_e     op,
  input  logic [31:0] wdata,
  input  logic [2:0]  rd_idx,
  output logic [31:0] rdata,
  output logic [6:0]  round
);

  typedef logic [31:0] word_t;

  function automatic word_t k_const(input logic [5:0] t);
    // FIPS 180-4 round constants: first 32 bits of the fractional parts of the
    // cube roots of the first 64 primes.
    case (t)
      6'd0:  return 32'h428a2f98; 6'd1:  return 32'h71374491; 6'd2:  return 32'hb5c0fbcf; 6'd3:  return 32'he9b5dba5;
      6'd4:  return 32'h3956c25b; 6'd5:  return 32'h59f111f1; 6'd6:  return 32'h923f82a4; 6'd7:  return 32'hab1c5ed5;
      6'd8:  return 32'hd807aa98; 6'd9:  return 32'h12835b01; 6'd10: return 32'h243185be; 6'd11: return 32'h550c7dc3;
      6'd12: return 32'h72be5d74; 6'd13: return 32'h80deb1fe; 6'd14: return 32'h9bdc06a7; 6'd15: return 32'hc19bf174;
      6'd16: return 32'he49b69c1; 6'd17: return 32'hefbe4786; 6'd18: return 32'h0fc19dc6; 6'd19: return 32'h240ca1cc;
      6'd20: return 32'h2de92c6f; 6'd21: return 32'h4a7484aa; 6'd22: return 32'h5cb0a9dc; 6'd23: return 32'h76f988da;
      6'd24: return 32'h983e5152; 6'd25: return 32'ha831c66d; 6'd26: return 32'hb00327c8; 6'd27: return 32'hbf597fc7;
      6'd28: return 32'hc6e00bf3; 6'd29: return 32'hd5a79147; 6'd30: return 32'h06ca6351; 6'd31: return 32'h14292967;
      6'd32: return 32'h27b70a85; 6'd33: return 32'h2e1b2138; 6'd34: return 32'h4d2c6dfc; 6'd35: return 32'h53380d13;
      6'd36: return 32'h650a7354; 6'd37: return 32'h766a0abb; 6'd38: return 32'h81c2c92e; 6'd39: return 32'h92722c85;
      6'd40: return 32'ha2bfe8a1; 6'd41: return 32'ha81a664b; 6'd42: return 32'hc24b8b70; 6'd43: return 32'hc76c51a3;
      6'd44: return 32'hd192e819; 6'd45: return 32'hd6990624; 6'd46: return 32'hf40e3585; 6'd47: return 32'h106aa070;
      6'd48: return 32'h19a4c116; 6'd49: return 32'h1e376c08; 6'd50: return 32'h2748774c; 6'd51: return 32'h34b0bcb5;
      6'd52: return 32'h391c0cb3; 6'd53: return 32'h4ed8aa4a; 6'd54: return 32'h5b9cca4f; 6'd55: return 32'h682e6ff3;
      6'd56: return 32'h748f82ee; 6'd57: return 32'h78a5636f; 6'd58: return 32'h84c87814; 6'd59: return 32'h8cc70208;
      6'd60: return 32'h90befffa; 6'd61: return 32'ha4506ceb; 6'd62: return 32'hbef9a3f7; default: return 32'hc67178f2;
    endcase
  endfunction

  function automatic word_t h_init(input int i);
    // Initial hash value: fractional parts of the square roots of the first 8 primes
    case (i)
      0: return 32'h6a09e667; 1: return 32'hbb67ae85; 2: return 32'h3c6ef372; 3: return 32'ha54ff53a;
      4: return 32'h510e527f; 5: return 32'h9b05688c; 6: return 32'h1f83d9ab; default: return 32'h5be0cd19;
    endcase
  endfunction

  function automatic word_t rotr(input word_t x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  word_t h_q [8];     // digest
  word_t v_q [8];     // working variables a..h
  word_t w_q [16];    // message window, w_q[0] = W[t]
  logic [6:0] round_q;

  // One compression round (combinational)
  word_t s0_big, s1_big, ch, maj, t1, t2, w_next, k_t;
  always_comb begin
    k_t    = k_const(round_q[5:0]);
    s1_big = rotr(v_q[4], 6) ^ rotr(v_q[4], 11) ^ rotr(v_q[4], 25);
    ch     = (v_q[4] & v_q[5]) ^ (~v_q[4] & v_q[6]);
    t1     = v_q[7] + s1_big + ch + k_t + w_q[0];
    s0_big = rotr(v_q[0], 2) ^ rotr(v_q[0], 13) ^ rotr(v_q[0], 22);
    maj    = (v_q[0] & v_q[1]) ^ (v_q[0] & v_q[2]) ^ (v_q[1] & v_q[2]);
    t2     = s0_big + maj;
    w_next = (rotr(w_q[14], 17) ^ rotr(w_q[14], 19) ^ (w_q[14] >> 10))
           + w_q[9]
           + (rotr(w_q[1], 7) ^ rotr(w_q[1], 18) ^ (w_q[1] >> 3))
           + w_q[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        h_q[i] <= h_init(i);
        v_q[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w_q[i] <= '0;
      round_q <= '0;
    end else begin
      unique case (op)
        SHA_RST: begin
          for (int i = 0; i < 8; i++) h_q[i] <= h_init(i);
          round_q <= '0;
        end
        SHA_PUSH: begin
          for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
          w_q[15] <= wdata;
        end
        SHA_START: begin
          for (int i = 0; i < 8; i++) v_q[i] <= h_q[i];
          round_q <= '0;
        end
        SHA_PERFORM: begin
          v_q[0] <= t1 + t2;
          v_q[1] <= v_q[0];
          v_q[2] <= v_q[1];
          v_q[3] <= v_q[2];
          v_q[4] <= v_q[3] + t1;
          v_q[5] <= v_q[4];
          v_q[6] <= v_q[5];
          v_q[7] <= v_q[6];
          for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
          w_q[15] <= w_next;
          if (round_q < 7'(ROUNDS)) round_q <= round_q + 7'd1;
        end
        SHA_FINISH: begin
          for (int i = 0; i < 8; i++) h_q[i] <= h_q[i] + v_q[i];
        end
        default: ;
      endcase
    end
  end

  // The round counter never passes the number of rounds of a block
  a_round_limit: assert property (@(posedge clk) disable iff (!rst_n) round_q <= 7'(ROUNDS));

  assign rdata = h_q[rd_idx];
  assign round = round_q;

endmodule
