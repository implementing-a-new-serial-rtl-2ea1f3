// key_loader: loads the secret key into the generator's state.
//
// The key is KEY_BYTES bytes (250 = 2000 bits by default), offered one byte
// at a time on a valid/ready handshake.  Each byte is sent into the scan
// chain that runs through all LFSRs and LSRs, one bit per clock, least
// significant bit first (load_en/load_bit).  Only the first CHAIN_LEN key
// bits (1242 = 504 LFSR bits + 738 LSR bits) have a place in the state:
// they are shifted in, the rest of the key is accepted and dropped.  When
// all KEY_BYTES*8 bits have been consumed, 'loaded' rises and the generator
// may run; 'rekey' starts a new load.
//
// Timing: a byte is accepted while the serialiser is empty or sending its
// last bit, so a byte every 8 clocks keeps the chain busy; a full key takes
// KEY_BYTES*8 clocks plus one for the first byte.  After loading, chain
// position p (p = 0 at the chain input) holds key bit CHAIN_LEN-1-p.
//
// Taken from the source description: the 250-byte key covering the LFSR
// and LSR state.  Own choices: the byte handshake, the bit order, the scan
// chain and dropping the surplus key bits.
module key_loader #(
  parameter int unsigned KEY_BYTES = sckg_pkg::KEY_BYTES,
  parameter int unsigned CHAIN_LEN = sckg_pkg::sum_len8(sckg_pkg::LFSR_LEN)
                                   + sckg_pkg::sum_len8(sckg_pkg::LSR_LEN)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rekey,
  input  logic       key_valid,
  input  logic [7:0] key_byte,
  output logic       key_ready,
  output logic       load_en,
  output logic       load_bit,
  output logic       loaded
);

  localparam int unsigned KEY_BITS = KEY_BYTES * 8;
  localparam int unsigned BW       = $clog2(KEY_BITS + 1);
  localparam int unsigned YW       = $clog2(KEY_BYTES + 1);

  initial assert (KEY_BITS >= CHAIN_LEN)
    else $fatal(1, "key_loader: key of %0d bits cannot fill %0d state bits",
                KEY_BITS, CHAIN_LEN);

  typedef enum logic {LOADING, RUNNING} phase_t;

  phase_t          phase;
  logic [7:0]      shreg;      // bits of the present byte not yet sent
  logic [3:0]      shcnt;      // how many of them
  logic [YW-1:0]   bytes_in;   // bytes accepted so far
  logic [BW-1:0]   bits_out;   // bits sent (or dropped) so far

  logic take, send;

  assign send      = (shcnt != 0);
  assign key_ready = (phase == LOADING) && (bytes_in < YW'(KEY_BYTES)) && (shcnt <= 4'd1);
  assign take      = key_valid && key_ready;
  assign load_bit  = shreg[0];
  assign load_en   = send && (bits_out < BW'(CHAIN_LEN));
  assign loaded    = (phase == RUNNING);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= LOADING;
      shreg    <= '0;
      shcnt    <= '0;
      bytes_in <= '0;
      bits_out <= '0;
    end else if (rekey) begin
      phase    <= LOADING;
      shreg    <= '0;
      shcnt    <= '0;
      bytes_in <= '0;
      bits_out <= '0;
    end else begin
      if (send) begin
        shreg    <= shreg >> 1;
        shcnt    <= shcnt - 4'd1;
        bits_out <= bits_out + BW'(1);
        if (bits_out == BW'(KEY_BITS - 1)) phase <= RUNNING;
      end
      if (take) begin
        shreg    <= key_byte;
        shcnt    <= 4'd8;
        bytes_in <= bytes_in + YW'(1);
      end
    end
  end

  // A byte is only taken when the serialiser has room for it.
  assert property (@(posedge clk) disable iff (!rst_n) take |-> shcnt <= 4'd1);
  // Nothing is shifted into the state once the generator runs.
  assert property (@(posedge clk) disable iff (!rst_n) loaded |-> !load_en);

endmodule
