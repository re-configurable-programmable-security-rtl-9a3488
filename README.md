# Re-configurable programmable security processor

This is a slave co-processor that takes the cryptographic work of a network stack (IPsec, IKE, SSL) off a host CPU. The host writes a small *task structure* into shared memory and queues its address. The processor fetches the structure, streams data through the right engine and writes the results back. It then raises a completion flag and an interrupt.

The main idea is that the engines are **programmable and configurable**, not hard-wired to one algorithm:

- The **authentication engine** is a small processor whose datapath suits the SHA and MD5 families. A set of configuration registers retargets its Boolean function generator, rotation units and padding logic to a new hash without changing the hardware.
- The **key generation engine** is a second small processor built around a Montgomery multiplier, for Diffie-Hellman, DSA, RSA and random numbers.
- The **cipher engine** wraps fixed DES/3DES and AES accelerators in a mode controller (ECB, CBC, OFB, CFB).

One cipher/hash part plus one key engine form a *layer*. This RTL implements one layer.

```
             host (64-bit slave port)                  external memory (64-bit)
                      |                                         |
                  host_if ---- task push ----> ic_engine ---- dma (2 channels)
                      |                          |   |   |         |
      program/data loads (engines idle)          |   |   |   local port, decoded
                      |                          v   v   v   by ic_engine
          +-----------+-----------+      cipher  auth  key
          |           |           |      engine  engine engine
     auth_engine  key_engine  (status)
```

`security_processor` is the top. Its ports are the host bus (`h_*`), the external memory port (`mem_*`), `irq`, and a `pulse` input. The pulse input is an optional entropy source for the key engine's random seed.

## Tasks, structures and the interconnect (`ic_engine`)

The host queues tasks by writing a structure address into an 8-entry task queue. For each task the interconnect takes these steps:

1. It fetches the ten-word structure into a local buffer through DMA channel 0.
2. It decodes the header and sets up the selected engine:
   - Cipher: it loads key and IV, configures algorithm and mode, then streams the data. Channel 0 carries words in; channel 1 carries ciphertext out to the write-back pointer, at the same time.
   - Authentication or key engine: it copies the data into the engine's data memory or registers, starts the engine's program at the given address, waits for `HALT`, and copies the result out.
3. It follows the *next link*. A non-zero link fetches the next structure of the chain. Chaining lets one request pass through several engines, for example decrypt then authenticate.
4. At the end of the chain it sets the complete flag of the task's channel ID and counts the task. `irq` is the OR of the four flags. The host clears a flag by writing 1 to it.

Task structure (64-bit words, word addresses relative to the structure):

| word | contents |
|---|---|
| +0 | header: `[1:0]` engine (0 cipher, 1 authentication, 2 key), `[3:2]` channel ID, `[4]` in/out bound (1 = inbound, decrypt), `[7:5]` algorithm (DES, 3DES, AES-128/192/256), `[9:8]` mode (ECB, CBC, OFB, CFB) |
| +1 | program start address `[8:0]`; result location `[25:16]` (a data-memory long word or the first key-engine register) |
| +2, +3 | data pointer, data length in words |
| +4, +5 | key pointer, key length in words (cipher: 4 key words, then 2 IV words) |
| +6, +7 | message digest / result pointer, its length |
| +8 | write-back pointer (cipher output) |
| +9 | next link (0 ends the chain) |

The field names follow the published structure. The bit positions and word order are this design's own.

The DMA's local port is decoded by address bits `[15:12]`:

| region | target |
|---|---|
| 0 | cipher data stream |
| 1 | cipher key/IV |
| 2 | authentication data memory |
| 3 | key engine registers |
| 4 | structure buffer |

The published architecture also allows one structure to name "all three engines". That is not built here; chains cover the same need.

## DMA (`dma`)

The DMA has two channels. Each channel is programmed with an external word address, a local word address, a length and a direction.

- **Interleaving.** Busy channels take turns word by word.
- **Yielding.** A channel whose local side cannot move (an empty output FIFO or a full input FIFO) yields to the other channel. It keeps any word it has already read.
- **Why yielding matters.** The cipher engine consumes plaintext and produces ciphertext at the same time. Without yielding, an outbound channel waiting for the first ciphertext would block the inbound channel that feeds it.
- **External port.** Request/acknowledge; read data arrives with the acknowledge. An assertion checks that a request holds its address until acknowledged.

## Host interface (`host_if`)

The host interface is a 64-bit request/acknowledge slave. `h_addr[19:16]` selects the region:

| region | contents |
|---|---|
| 0 | control: word 0 write queues a structure address and read returns the queue level; word 1 holds the complete flags (write 1 to clear); word 2 counts finished tasks; word 3 reads `{active, irq}` |
| 1 | authentication configuration registers |
| 2 | authentication program memory (512 x 64) |
| 3 | authentication constants memory (256 x 64) |
| 4 | authentication data memory (1024 x 64) |
| 5 | key engine program memory (512 x 32) |
| 6 | key engine registers (16 x 64) |

Engine accesses wait (no `h_ack`) while a task is running, because the interconnect then owns the engines' load ports. Pushing a task waits while the queue is full.

## Cipher engine (`cipher_engine`, `des_core`, `aes_core`)

- **Buffers.** Input and output buffers are 16-word FIFOs.
- **Controller.** It gathers one word (DES) or two words (AES) into a block. It applies the chaining mode around the accelerator and writes the result words out. These three jobs overlap: the next block is gathered, and the last result written out, while the accelerator works.
- **CFB and OFB.** Both work on whole blocks.
- **`des_core`.** It computes four Feistel rounds per clock, so a DES block takes 6 clocks and a 3DES (EDE) block 18 clocks. These are the published figures.
- **`aes_core`.** It spends two clocks per round: S-box/ShiftRows, then MixColumns/AddRoundKey. That gives 20, 24 and 28 clocks for 128/192/256-bit keys, matching the published figures.
- **AES key schedule.** It is expanded once per key into a round-key store, one word per clock. Decryption walks the store backwards.
- **Control overhead.** In a stream of blocks, each block costs two clocks beyond the accelerator (DES, 3DES) or three (AES). One captures the result and one starts the next block; AES also waits for its second result word to leave.

The published engine has a programmable controller with its own instruction set. That instruction set is not described, so the controller here is a fixed state machine.

## Authentication engine (`auth_engine` and its units)

The engine executes one 64-bit instruction per clock in a two-stage fetch/execute pipeline. A taken jump, call or return costs one bubble; loops cost none. It has:

- **Two 16 x 64-bit register files**: MCU for the working variables, MGU for the message schedule. Operand bit 4 selects the file. Either file can shift its first N registers by one place in a single instruction (`regfile`), as a hash's variable rotation needs.
- **Multi-operand adder** (`madd`): up to four operands in one clock. In 32-bit mode it adds two independent 32-bit lanes.
- **Sigma generator** (`sigma_gen`): the XOR of three rotations of one operand. The amounts come from an 18-bit configuration word (three 6-bit fields), and the third term can be a shift instead. Two MCU and two MGU configuration words give the four SHA-2 sigma functions.
- **Function generator** (`func_gen`): a configurable three-operand Boolean function. It is built from pair functions XY, YZ and ZX, each with optional operand inversion and a choice of pass/AND/OR/XOR. Bits `[14:12]` combine XY with YZ, and bits `[17:15]` combine that with ZX. XY sits in bits `[3:0]`; YZ in `[7:4]` and ZX in `[11:8]` are this design's placement. Four configuration words cover Ch, Maj, parity and the MD5 functions.
- **Rotator/shifter** (`rotshift`), **message history buffer** (`msg_hist`, 16 deep, two taps) and **pad unit** (`pad_unit`). The pad unit keeps the bytes before a configured position, inserts the pad byte and zero-fills the rest. The pad byte is 8 bits wide; the description gives seven bits, which cannot hold 0x80.
- **Memories:** an 8 KB data memory with 16/32/64-bit accesses and eight post-incrementing address registers (`agu`, `auth_dmem`). There is also a constants memory for round constants.
- **Load modes:** set by the general configuration register. A load can pass the data through, XOR it with the HMAC ipad or opad, or compare it with a register; a mismatch sets `cmp_fail`.
- **Program control** (`prog_ctrl`): two nested zero-overhead loops and a four-deep call stack.

The instruction set is in `auth_isa_pkg`, and the configuration register map in `auth_cfg`. The testbenches contain complete programs that show how the units are meant to be used:

- SHA-256 in `tb/tb_sha_pkg.sv`;
- SHA-1 in `tb_auth_sha1`;
- SHA-512 and SHA-384 in `tb_auth_sha512`, using the 64-bit mode;
- MD5 in `tb_auth_md5`.

Each computes the published digest of "abc". They take 2 to 9 times the published cycle counts (see the performance table). Reaching those counts needs several units to work in the same instruction, which this instruction set does not do.

## Key generation engine (`key_engine` and its units)

The key generation engine is a 32-bit-instruction processor with 16 x 64-bit registers and the same program control block. Its units are:

- **`mont_mul`**: a radix-2 Montgomery multiplier, A·B·2⁻ⁿ mod M for n = 160, 512 or 1024. It takes n + 1 clocks and runs in the background. Operands and results move in 64-bit words (`MMW`, `MMR`), and `JMB` busy-waits on it.
- **`mp_adder`** and **`mp_shifter`**: a 64-bit adder with carry/borrow chaining, and a 64-bit shifter with a fill word. Together they give multiprecision add, subtract, compare and shift.
- **`logic16`**: a 16-bit logical unit.
- **`x917_prng`**: an ANSI X9.17 generator. It runs three 3DES encryptions on one `des_core`, with registers r13–r15 as its keys, and takes 63 clocks per 64-bit number. The published figure is 120.
- **`pulse_rng`**: a free-running counter mixed into a seed on each synchronised edge of the `pulse` input.

Opcodes are listed in `key_isa_pkg`. `tb_key_modexp` holds a modular exponentiation program, the core of Diffie-Hellman, DSA and RSA:

- square-and-multiply, taking each exponent bit from the adder's carry (`ADD e, e, e`);
- a zero-overhead loop whose count comes from a register;
- a busy-wait on each Montgomery product.

With a 160-bit modulus and a 64-bit exponent it takes 12,000 to 18,000 clocks. The same testbench runs a Diffie-Hellman exchange with this program. Each party's public value and both shared secrets are computed on the engine, and the test checks that the two shared secrets agree. The complete DSA and RSA programs are not included, and neither are the key sizes behind the published cycle counts. With 16 registers, 1024-bit RSA does not fit without more operand storage.

## Performance against the published targets (133 MHz)

| operation | published cycles | this RTL |
|---|---|---|
| DES / 3DES block | 6 / 18 | 6 / 18 in the accelerator; 8 / 20 per block in a stream |
| AES-128/192/256 block | 20 / 24 / 28 | 20 / 24 / 28 in the accelerator; 23 / 27 / 31 per block in a stream |
| SHA-1 block | 160 | 1454 |
| SHA-256 block | 212 | 1351 |
| SHA-384/512 block | 250 | 1703 |
| MD5 block | 205 | 468 (fully unrolled program) |
| 64-bit random number | 120 | 63 |

Streaming cipher throughput is therefore about 1.06 Gbps for DES and 740 Mbps for AES-128 at 133 MHz. That is below the 1.2 Gbps quoted for the cipher engine, but above the 512 Mbps quoted for a layer.

## Simulating

Every file in `tb/` is a self-checking testbench. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. Packages must be read first. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/sp_pkg.sv rtl/auth_isa_pkg.sv rtl/key_isa_pkg.sv tb/tb_sha_pkg.sv \
    tb/tb_security_processor.sv --top-module tb_security_processor
./obj_dir/Vtb_security_processor
```

`tb_security_processor` runs the top at its default sizes. It loads the SHA-256 program and a key-engine program, then queues three tasks:

- AES-128-CBC on two blocks (SP 800-38A vectors);
- a chain of DES (FIPS 46 example) followed by SHA-256("abc");
- a key-engine task.

It checks every result and the flags. It also counts the mechanisms it relies on, failing if any never happens: queueing, chaining, both DMA channels active at once, memory wait states, and host accesses held off during a task.

Unit testbenches compare against standard test vectors (DES, AES, SHA-256) or against reference models written in the testbench. `tb/ext_mem_model.sv` is a behavioural external memory with a settable number of wait states.

## Where this design departs from the published architecture

- The instruction sets of both programmable engines, the task-structure bit layout, the host address map and all handshakes are this design's own. The published description gives none of them.
- The cipher engine's controller is fixed, not programmable.
- The hash programs take 2 to 9 times the published cycle counts, and the public-key programs are not included.
- Structures naming all three engines, and multi-layer configurations, are not built.
- The MGU and MCU datapaths exist as separate register files and sigma configurations, but one instruction drives one unit, so message generation and compression do not overlap in time.
- The per-layer and per-engine sleep mode for idle periods is not built.
- RIPEMD and TIGER, named as portable to the authentication engine, have no programs here.
- The pad byte is 8 bits, not 7.
- Positions of the YZ and ZX fields in the function generator configuration are chosen here.
- Where the description conflicts on the Montgomery size (512 x 512 versus 160/512/1024-bit operands), 1024 bits is implemented.
